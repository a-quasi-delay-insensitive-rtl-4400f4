// dr_or: dual-rail OR gate.
// Built as in the original gate diagram from four C-elements: z.f is the C-element of a.f and
// b.f; z.t is the OR of the C-elements (a.t,b.f), (a.f,b.t) and (a.t,b.t). The output becomes
// valid only when both inputs are valid and returns to null only when both are null, so the
// gate is delay insensitive. W copies are placed side by side (a W-bit bitwise OR).
// Latency: one C-element tick.
module dr_or #(
  parameter int W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a_t, a_f,
  input  logic [W-1:0] b_t, b_f,
  output logic [W-1:0] z_t, z_f
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    logic c_tf, c_ft, c_tt;
    c_element u_ff (.clk, .rst_n, .a(a_f[i]), .b(b_f[i]), .y(z_f[i]));
    c_element u_tf (.clk, .rst_n, .a(a_t[i]), .b(b_f[i]), .y(c_tf));
    c_element u_ft (.clk, .rst_n, .a(a_f[i]), .b(b_t[i]), .y(c_ft));
    c_element u_tt (.clk, .rst_n, .a(a_t[i]), .b(b_t[i]), .y(c_tt));
    assign z_t[i] = c_tf | c_ft | c_tt;
  end
endmodule
