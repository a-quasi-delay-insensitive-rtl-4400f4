// if_stage: instruction fetch.
// Input: the PC token {stall, pc} from the PC latch (dual-rail). Its completion is the Read
// signal: while the PC token is a complete valid word the stage reads the program memory at
// pc and emits {stall, pc, w1, w0} as a valid dual-rail word to the IF/ID latch; when the PC
// latch returns to null (after the IF/ID latch has acknowledged) Read falls and the output
// returns to null. The current pc travels with the instruction so that the decode stage can
// compute the next PC. Fetching the following word w1 in the same access is this design's
// choice for the two-word instructions (GOTO, CALL, MOVFF).
module if_stage
  import nctu_pkg::*;
#(
  parameter int AW = 12
) (
  input  logic [PCW:0]      pc_t, pc_f,      // {stall, pc}
  output logic [AW-1:0]     imem_addr,
  input  logic [15:0]       imem_w0,
  input  logic [15:0]       imem_w1,
  output logic [PCW+32:0]   out_t, out_f,    // {stall, pc, w1, w0}
  output logic              read
);
  logic [PCW+32:0] word;
  assign read      = &(pc_t | pc_f);
  assign imem_addr = pc_t[AW:1];
  assign word      = {pc_t, imem_w1, imem_w0};
  assign out_t     = word & {(PCW+33){read}};
  assign out_f     = ~word & {(PCW+33){read}};
endmodule
