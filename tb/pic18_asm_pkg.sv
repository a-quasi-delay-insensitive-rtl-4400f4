// pic18_asm_pkg: instruction encoders (PIC18 encodings) and a reference instruction-set
// model of the implemented subset, used by the core testbenches. The model is written
// independently of the RTL: it executes one instruction at a time on plain arrays.
// Conventions shared with the core: a write to STATUS as destination suppresses the flag
// update of that instruction; the return stack is indexed by STKPTR, entry 0 unused; a word
// with 1111 in its top bits (the second word of MOVFF, CALL or GOTO reached by a branch)
// executes as a NOP, as on PIC18.
package pic18_asm_pkg;
  // byte-oriented: opcode6 d a f
  function automatic logic [15:0] bo(input logic [5:0] op6, input logic d, input logic a, input logic [7:0] f);
    return {op6, d, a, f};
  endfunction
  // bit-oriented: opcode4 b a f
  function automatic logic [15:0] bb(input logic [3:0] op4, input logic [2:0] b, input logic a, input logic [7:0] f);
    return {op4, b, a, f};
  endfunction
  localparam logic [5:0] ADDWF = 6'b001001, ADDWFC = 6'b001000, ANDWF = 6'b000101, COMF = 6'b000111,
    DECF = 6'b000001, INCF = 6'b001010, IORWF = 6'b000100, MOVF = 6'b010100, RLCF = 6'b001101,
    RLNCF = 6'b010001, RRCF = 6'b001100, RRNCF = 6'b010000, SUBFWB = 6'b010101, SUBWF = 6'b010111,
    SUBWFB = 6'b010110, XORWF = 6'b000110;
  localparam logic [6:0] CLRF = 7'b0110101, MOVWF = 7'b0110111, MULWF = 7'b0000001, NEGF = 7'b0110110,
    SETF = 7'b0110100;
  localparam logic [3:0] BCF = 4'b1001, BSF = 4'b1000, BTG = 4'b0111;
  localparam logic [7:0] ADDLW = 8'h0F, ANDLW = 8'h0B, IORLW = 8'h09, MOVLW = 8'h0E, MULLW = 8'h0D,
    SUBLW = 8'h08, XORLW = 8'h0A;
  function automatic logic [15:0] fa7(input logic [6:0] op7, input logic a, input logic [7:0] f);
    return {op7, a, f};
  endfunction
  function automatic logic [15:0] lit(input logic [7:0] op8, input logic [7:0] k);
    return {op8, k};
  endfunction
  function automatic logic [15:0] movlb(input logic [3:0] k); return {12'h010, k}; endfunction
  // conditional branch: cc = 0 BZ,1 BNZ,2 BC,3 BNC,4 BOV,5 BNOV,6 BN,7 BNN; n in words
  function automatic logic [15:0] bcc(input logic [2:0] cc, input logic [7:0] n); return {5'b11100, cc, n}; endfunction
  function automatic logic [15:0] bra(input logic [10:0] n); return {5'b11010, n}; endfunction
  function automatic logic [15:0] rcall(input logic [10:0] n); return {5'b11011, n}; endfunction
  localparam logic [15:0] NOP = 16'h0000, PUSH = 16'h0005, POP = 16'h0006, RETURN = 16'h0012;

  // ------------------------------------------------------------------ reference model
  class iss;
    logic [15:0] pm [4096];
    logic [7:0]  dm [4096];
    logic [20:0] stack [32];
    logic [7:0]  w, bsr, status, stkptr;
    logic [20:0] pc;
    int n_exec, n_twopass, n_taken, n_nottaken;

    function new();
      w = 0; bsr = 0; status = 0; stkptr = 0; pc = 0;
      n_exec = 0; n_twopass = 0; n_taken = 0; n_nottaken = 0;
      foreach (stack[i]) stack[i] = 0;
    endfunction

    function logic [7:0] rd(input logic [11:0] a);
      case (a)
        12'hFE8: return w;
        12'hFE0: return bsr;
        12'hFD8: return status;
        12'hFFC: return stkptr;
        default: return dm[a];
      endcase
    endfunction
    // returns 1 when the write went to STATUS
    function bit wr(input logic [11:0] a, input logic [7:0] v);
      case (a)
        12'hFE8: w = v;
        12'hFE0: bsr = v;
        12'hFD8: begin status = v; return 1; end
        12'hFFC: stkptr = v;
        default: dm[a] = v;
      endcase
      return 0;
    endfunction

    // integer based flag computation: r = x + y + c  (add) or x - y - c (sub)
    function void arith(input bit sub, input int x, input int y, input int c, output logic [7:0] r, output logic [4:0] fl);
      int full, lo, sres;
      int sx, sy;
      sx = (x > 127) ? x - 256 : x;
      sy = (y > 127) ? y - 256 : y;
      if (!sub) begin
        full = x + y + c; lo = (x % 16) + (y % 16) + c; sres = sx + sy + c;
        fl[0] = full > 255; fl[1] = lo > 15;
      end else begin
        full = x - y - c; lo = (x % 16) - (y % 16) - c; sres = sx - sy - c;
        fl[0] = full >= 0; fl[1] = lo >= 0;
      end
      r = full[7:0];
      fl[3] = (sres > 127) || (sres < -128);
      fl[2] = (r == 0);
      fl[4] = r[7];
    endfunction

    function void setfl(input logic [4:0] mask, input logic [4:0] fl);
      status[4:0] = (status[4:0] & ~mask) | (fl & mask);
    endfunction

    function void step();
      logic [15:0] i0, i1;
      logic [7:0] f, v, r;
      logic [11:0] ea;
      logic [4:0] fl, mask;
      logic d, a, is_st, taken, flag;
      int c;
      i0 = pm[pc[12:1]]; i1 = pm[pc[12:1] + 1];
      f = i0[7:0]; a = i0[8]; d = i0[9];
      ea = a ? {bsr[3:0], f} : (f[7] ? {4'hF, f} : {4'h0, f});
      n_exec++;
      pc = pc + 2;
      mask = 0; fl = 0; is_st = 0;
      casez (i0)
        16'h0005: begin stkptr++; stack[stkptr[4:0]] = pc; end
        16'h0006: stkptr--;
        16'b0000_0000_0001_001?: begin n_twopass++; pc = stack[stkptr[4:0]]; stkptr--; end
        16'b0000_0001_0000_????: bsr = {4'h0, i0[3:0]};
        16'b0000_001?_????_????: begin {dm[12'hFF4], dm[12'hFF3]} = w * rd(ea); end
        16'b0000_1000_????_????: begin arith(1, int'(f), int'(w), 0, w, fl); setfl(5'h1F, fl); end
        16'b0000_1001_????_????: begin w = w | f; setfl(5'b10100, {w[7], 1'b0, w == 0, 2'b0}); end
        16'b0000_1010_????_????: begin w = w ^ f; setfl(5'b10100, {w[7], 1'b0, w == 0, 2'b0}); end
        16'b0000_1011_????_????: begin w = w & f; setfl(5'b10100, {w[7], 1'b0, w == 0, 2'b0}); end
        16'b0000_1101_????_????: begin {dm[12'hFF4], dm[12'hFF3]} = w * f; end
        16'b0000_1110_????_????: w = f;
        16'b0000_1111_????_????: begin arith(0, int'(w), int'(f), 0, w, fl); setfl(5'h1F, fl); end
        16'b1100_????_????_????: begin is_st = wr(i1[11:0], rd(i0[11:0])); pc = pc + 2; end
        16'b0110_100?_????_????: is_st = wr(ea, 8'hFF);
        16'b0110_101?_????_????: begin is_st = wr(ea, 8'h00); if (!is_st) status[2] = 1; end
        16'b0110_110?_????_????: begin arith(1, 0, int'(rd(ea)), 0, r, fl); is_st = wr(ea, r); if (!is_st) setfl(5'h1F, fl); end
        16'b0110_111?_????_????: is_st = wr(ea, w);
        16'b0111_????_????_????: is_st = wr(ea, rd(ea) ^ (8'h1 << i0[11:9]));
        16'b1000_????_????_????: is_st = wr(ea, rd(ea) | (8'h1 << i0[11:9]));
        16'b1001_????_????_????: is_st = wr(ea, rd(ea) & ~(8'h1 << i0[11:9]));
        16'b1101_0???_????_????: pc = pc + {{9{i0[10]}}, i0[10:0], 1'b0};
        16'b1101_1???_????_????: begin stkptr++; stack[stkptr[4:0]] = pc; pc = pc + {{9{i0[10]}}, i0[10:0], 1'b0}; end
        16'b1110_0???_????_????: begin
          n_twopass++;
          case (i0[10:9]) 0: flag = status[2]; 1: flag = status[0]; 2: flag = status[3]; default: flag = status[4]; endcase
          taken = flag ^ i0[8];
          if (taken) begin pc = pc + {{12{i0[7]}}, i0[7:0], 1'b0}; n_taken++; end
          else n_nottaken++;
        end
        16'b1110_110?_????_????: begin stkptr++; stack[stkptr[4:0]] = pc + 2; pc = {i1[11:0], i0[7:0], 1'b0}; end
        16'b1110_1111_????_????: pc = {i1[11:0], i0[7:0], 1'b0};
        16'b0000_0000_0000_0000: ;
        16'b1111_????_????_????: ;   // second word of a two-word instruction runs as NOP
        default: begin
          // byte-oriented operations with a destination bit
          v = rd(ea);
          mask = 5'h1F;
          case (i0[15:10])
            ADDWF:  arith(0, int'(v), int'(w), 0, r, fl);
            ADDWFC: arith(0, int'(v), int'(w), int'(status[0]), r, fl);
            SUBWF:  arith(1, int'(v), int'(w), 0, r, fl);
            SUBWFB: arith(1, int'(v), int'(w), int'(!status[0]), r, fl);
            SUBFWB: arith(1, int'(w), int'(v), int'(!status[0]), r, fl);
            INCF:   arith(0, int'(v), 1, 0, r, fl);
            DECF:   arith(1, int'(v), 1, 0, r, fl);
            ANDWF:  begin r = v & w; mask = 5'b10100; end
            IORWF:  begin r = v | w; mask = 5'b10100; end
            XORWF:  begin r = v ^ w; mask = 5'b10100; end
            COMF:   begin r = ~v;    mask = 5'b10100; end
            MOVF:   begin r = v;     mask = 5'b10100; end
            RLCF:   begin r = {v[6:0], status[0]}; fl[0] = v[7]; mask = 5'b10101; end
            RRCF:   begin r = {status[0], v[7:1]}; fl[0] = v[0]; mask = 5'b10101; end
            RLNCF:  begin r = {v[6:0], v[7]}; mask = 5'b10100; end
            RRNCF:  begin r = {v[0], v[7:1]}; mask = 5'b10100; end
            default: begin r = v; mask = 0; $display("ISS: unknown instruction %h", i0); end
          endcase
          if (mask == 5'b10100 || mask == 5'b10101) begin fl[2] = (r == 0); fl[4] = r[7]; end
          if (d) is_st = wr(ea, r); else w = r;
          if (!is_st) setfl(mask, fl);
        end
      endcase
    endfunction
  endclass
endpackage
