// ex_alu: arithmetic/logic execution element of the EX sub-stage.
// Input: dual-rail operand bundle {op[2:0], status[7:0], s2[7:0], s1[7:0]}; op is one of
// nctu_pkg::aluop_e (add, add with carry, subtract s1-s2, subtract with borrow, and, or, xor,
// pass s1). Output: dual-rail {flags[4:0] (N, OV, Z, DC, C), hi[7:0] = 0, res[7:0]}.
// The ALU is itself a DeMUX-MERGE pair with two paths of different speed: the inclusive OR
// goes through a bank of dual-rail OR gates built from C-elements (one tick), every other
// operation through combinational logic. The merged output is the OR of the two paths, only
// one of which is ever non-null; its completion tells the next stage the result is ready.
// PIC18 flag rules: subtraction is s1 + ~s2 + (no-borrow), C and DC mean "no borrow".
module ex_alu
  import nctu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [26:0] in_t, in_f,
  output logic [20:0] out_t, out_f
);
  logic ok, sel_or, or_ok, or_any;
  logic [2:0] op;
  logic [7:0] st, s2, s1, res, b, or_t, or_f;
  logic [4:0] fl;
  logic [8:0] sum;
  logic cin;
  logic [20:0] ocomb, oor;

  assign ok = &(in_t | in_f);
  assign {op, st, s2, s1} = in_t;
  assign sel_or = ok & (op == OP_IOR);

  // path 1: dual-rail OR gates
  dr_or #(.W(8)) u_or (.clk, .rst_n,
    .a_t(in_t[7:0] & {8{sel_or}}),  .a_f(in_f[7:0] & {8{sel_or}}),
    .b_t(in_t[15:8] & {8{sel_or}}), .b_f(in_f[15:8] & {8{sel_or}}),
    .z_t(or_t), .z_f(or_f));
  assign or_ok = sel_or & (&(or_t | or_f));
  assign oor   = {or_t[7], st[ST_OV], (or_t == 8'h00), st[ST_DC], st[ST_C], 8'h00, or_t};

  // path 2: combinational arithmetic and logic
  always_comb begin
    b   = s2;
    cin = 1'b0;
    unique case (op)
      OP_ADD:  begin b = s2;  cin = 1'b0;      end
      OP_ADDC: begin b = s2;  cin = st[ST_C];  end
      OP_SUB:  begin b = ~s2; cin = 1'b1;      end
      OP_SUBB: begin b = ~s2; cin = st[ST_C];  end
      default: ;
    endcase
    sum = {1'b0, s1} + {1'b0, b} + 9'(cin);
    unique case (op)
      OP_AND:  res = s1 & s2;
      OP_XOR:  res = s1 ^ s2;
      OP_PASS: res = s1;
      OP_IOR:  res = s1 | s2;
      default: res = sum[7:0];
    endcase
    fl = st[4:0];
    fl[ST_Z] = (res == 8'h00);
    fl[ST_N] = res[7];
    if (op inside {OP_ADD, OP_ADDC, OP_SUB, OP_SUBB}) begin
      fl[ST_C]  = sum[8];
      fl[ST_DC] = sum[4] ^ s1[4] ^ b[4];   // carry out of bit 3
      fl[ST_OV] = (s1[7] == b[7]) && (res[7] != s1[7]);
    end
    ocomb = {fl, 8'h00, res};
  end

  // merge: the OR path stays visible until its gates have returned to null
  assign or_any = |(or_t | or_f);
  always_comb begin
    if (ok & !sel_or) begin
      out_t = ocomb;  out_f = ~ocomb;
    end else if (or_ok) begin
      out_t = oor;    out_f = ~oor;
    end else if (or_any) begin
      out_t = {13'd0, or_t};  out_f = {13'd0, or_f};
    end else begin
      out_t = '0;     out_f = '0;
    end
  end
endmodule
