// nctu_pkg: types and constants shared by the stages of the NCTUAC18 dual-rail core.
// Dual-rail words are carried as two vectors, t (true rail) and f (false rail): bit value 1 is
// (t,f)=(1,0), value 0 is (0,1), and (0,0) is the null spacer of the 4-phase protocol.
// The control fields below are this design's own encoding; the field widths printed in the
// EX/WB block diagram (source1/2, status, result = 8 bits, function code = 2 bits, physical
// address = 12 bits, dest = 4 bits) are followed.
package nctu_pkg;
  localparam int PCW = 21;          // PIC18 program counter width (byte address)

  // function code[1:0]: which execution element of the EX sub-stage is used
  typedef enum logic [1:0] {FC_PASS = 2'd0, FC_ALU = 2'd1, FC_ROT = 2'd2, FC_MUL = 2'd3} fcode_e;

  // operation within the ALU (FC_ALU) or rotator (FC_ROT, only the low two bits)
  typedef enum logic [2:0] {
    OP_ADD = 3'd0, OP_ADDC = 3'd1, OP_SUB = 3'd2, OP_SUBB = 3'd3,
    OP_AND = 3'd4, OP_IOR = 3'd5, OP_XOR = 3'd6, OP_PASS = 3'd7
  } aluop_e;
  localparam logic [2:0] ROT_RLC = 3'd0, ROT_RLNC = 3'd1, ROT_RRC = 3'd2, ROT_RRNC = 3'd3;

  // source selectors used by the OF stage
  typedef enum logic [1:0] {S1_F = 2'd0, S1_W = 2'd1, S1_K = 2'd2, S1_ZERO = 2'd3} s1sel_e;
  typedef enum logic [2:0] {
    S2_W = 3'd0, S2_F = 3'd1, S2_K = 3'd2, S2_ONE = 3'd3,
    S2_ZERO = 3'd4, S2_FF = 3'd5, S2_BIT = 3'd6, S2_NBIT = 3'd7
  } s2sel_e;
  // destination as decoded by ID (file register address is resolved in OF)
  typedef enum logic [2:0] {
    DS_NONE = 3'd0, DS_W = 3'd1, DS_F = 3'd2, DS_BSR = 3'd3, DS_PROD = 3'd4, DS_MOVFF = 3'd5
  } dsel_e;
  // dest[3:0]: physical destination after OF remapping
  typedef enum logic [3:0] {
    D_NONE = 4'd0, D_MEM = 4'd1, D_WREG = 4'd2, D_BSR = 4'd3,
    D_STATUS = 4'd4, D_STKPTR = 4'd5, D_PROD = 4'd6
  } dest_e;
  // return-stack operation
  typedef enum logic [1:0] {SOP_NONE = 2'd0, SOP_PUSH = 2'd1, SOP_POP = 2'd2} sop_e;

  // STATUS bit positions (PIC18)
  localparam int ST_C = 0, ST_DC = 1, ST_Z = 2, ST_OV = 3, ST_N = 4;

  // addresses of the special function registers that are held in real registers (PIC18 map)
  localparam logic [11:0] A_WREG = 12'hFE8, A_BSR = 12'hFE0, A_STATUS = 12'hFD8,
                          A_STKPTR = 12'hFFC, A_PRODL = 12'hFF3, A_PRODH = 12'hFF4;

  // ID -> OF token (the "Data" and "CONT" fields of the ID/OF latch)
  typedef struct packed {
    logic [15:0] w0;       // instruction word
    logic [15:0] w1;       // second word (MOVFF destination)
    logic [PCW-1:0] ret;   // return address for CALL/RCALL/PUSH
    fcode_e fcode;
    logic [2:0] op;
    logic [4:0] fmask;     // STATUS bits this instruction updates
    s1sel_e s1sel;
    s2sel_e s2sel;
    dsel_e dsel;
    sop_e sop;
  } idof_t;

  // OF -> EX/WB token (the "S1", "S2", "DST" and "CONT" fields of the OF/EX latch)
  typedef struct packed {
    logic [7:0] s1;
    logic [7:0] s2;
    logic [7:0] status;
    fcode_e fcode;
    logic [2:0] op;
    logic [4:0] fmask;
    logic [11:0] paddr;
    dest_e dest;
    sop_e sop;
    logic [PCW-1:0] ret;
  } ofex_t;

  localparam int IDOF_W = $bits(idof_t);
  localparam int OFEX_W = $bits(ofex_t);
endpackage
