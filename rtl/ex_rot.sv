// ex_rot: rotate execution element of the EX sub-stage (RLCF, RLNCF, RRCF, RRNCF).
// Input: dual-rail operand bundle {op[2:0], status[7:0], s2[7:0], s1[7:0]}; op (one of
// nctu_pkg's ROT_* codes) picks left/right and through-carry or not. Output: dual-rail {flags[4:0], hi[7:0],
// res[7:0]} with flags in PIC18 STATUS order (N, OV, Z, DC, C; only C, Z and N are
// meaningful here), valid when the input is complete and null when it is not (combinational).
module ex_rot
  import nctu_pkg::*;
(
  input  logic [26:0] in_t, in_f,
  output logic [20:0] out_t, out_f
);
  logic ok, cin, cout;
  logic [2:0] op;
  logic [7:0] st, s1, res;
  logic [20:0] o;
  assign ok = &(in_t | in_f);
  assign {op, st, s1} = {in_t[26:16], in_t[7:0]};
  assign cin = st[ST_C];
  always_comb begin
    unique case (op)
      ROT_RLC:  begin res = {s1[6:0], cin};   cout = s1[7]; end
      ROT_RLNC: begin res = {s1[6:0], s1[7]}; cout = cin;   end
      ROT_RRC:  begin res = {cin, s1[7:1]};   cout = s1[0]; end
      default:  begin res = {s1[0], s1[7:1]}; cout = cin;   end
    endcase
    o = {res[7], st[ST_OV], (res == 8'h00), st[ST_DC], cout, 8'h00, res};
  end
  assign out_t = o & {21{ok}};
  assign out_f = ~o & {21{ok}};
endmodule
