// Final BCD correction of an extended-BCD number.
//
// After the last adder of a tree the digits 8 and 9 may still be coded as
// 1110 and 1111. Each digit is mapped to plain BCD by clearing bits 2 and 1
// whenever bit 3 is set: s2 = ~s3* & s2*, s1 = ~s3* & s1*, while bits 3 and 0
// pass unchanged. That is two AND gates with one inverted input per digit
// (the original design places them in otherwise unused slice storage elements; here
// they are ordinary gates). Purely combinational.
module bcd_correction #(
  parameter int NDIG = 18
) (
  input  logic [4*NDIG-1:0] s_ext,
  output logic [4*NDIG-1:0] s
);

  always_comb begin
    for (int i = 0; i < NDIG; i++) begin
      s[4*i+3] = s_ext[4*i+3];
      s[4*i+2] = ~s_ext[4*i+3] & s_ext[4*i+2];
      s[4*i+1] = ~s_ext[4*i+3] & s_ext[4*i+1];
      s[4*i]   = s_ext[4*i];
    end
  end

endmodule
