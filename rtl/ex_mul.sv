// ex_mul: 8 x 8 unsigned multiply execution element (MULWF, MULLW).
// Input: dual-rail operand bundle {op, status, s2, s1}. Output: dual-rail {flags, hi, res}
// with the 16-bit product in {hi, res} and the STATUS flags passed through unchanged (the
// PIC18 multiply affects no flag). Combinational; valid only while the input is complete.
module ex_mul (
  input  logic [26:0] in_t, in_f,
  output logic [20:0] out_t, out_f
);
  logic ok;
  logic [15:0] p;
  logic [20:0] o;
  assign ok    = &(in_t | in_f);
  assign p     = in_t[15:8] * in_t[7:0];
  assign o     = {in_t[20:16], p};
  assign out_t = o & {21{ok}};
  assign out_f = ~o & {21{ok}};
endmodule
