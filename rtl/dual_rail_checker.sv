// dual_rail_checker: XOR verification of a dual-rail byte.
//
// A correctly evaluated dual-rail byte has out_f equal to the complement of
// out_t, so their bitwise XOR is all ones and its Hamming weight is constant
// (8). This block forms that XOR and reports whether it is all ones. The
// check is only meaningful in the evaluation phase: `check` qualifies it.
// Outputs:
//   xor_out   - out_t ^ out_f, combinational
//   all_ones  - (xor_out == 8'hFF), combinational
//   pass      - registered: result of the last qualified check
//   alarm     - registered and sticky until reset: some qualified check failed
// The XOR and all-ones test follow the source; the registered pass flag and
// the sticky alarm are this design's choice for driving status LEDs.
module dual_rail_checker
  import arcd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,    // active-low synchronous reset
  input  dr_byte_t   dr,       // dual-rail byte under test
  input  logic       check,    // evaluate the check this cycle
  output logic [7:0] xor_out,
  output logic       all_ones,
  output logic       pass,
  output logic       alarm
);
  always_comb begin
    xor_out  = dr.t ^ dr.f;
    all_ones = &xor_out;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pass  <= 1'b0;
      alarm <= 1'b0;
    end else if (check) begin
      pass <= all_ones;
      if (!all_ones) alarm <= 1'b1;
    end
  end
endmodule
