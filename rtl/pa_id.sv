// pa_id: instruction decode (ID) stage of the pipelined 8051.
//
// ID1 collects the one to three bytes of an instruction from the IF byte stream
// (the opcode fixes the length; the second and third bytes are addresses or
// immediate data that pass through untouched). ID2 turns the instruction into
// the three control bundles of the later stages: the EXE opcode, ReadIn for OF
// (read control, addresses, immediates, write-back address) and WriteIn for WB
// (write control and branch target).
//
// Control flow:
//  * NOP, AJMP, LJMP and SJMP complete here: ID redirects IF and sends nothing on.
//  * ACALL, LCALL, RET and RETI also finish in ID. ID waits until every older
//    instruction has left the pipeline, reads SP (and for a return the two
//    stacked PC bytes) through the read arbiter, redirects IF, and hands OF plain
//    data moves that store the return address and the new SP.
//  * Conditional jumps are resolved in EXE; WB reports a taken one on jmp with
//    its target. ID then flips its colour bit, redirects IF and drops any bytes
//    it had collected. Every instruction sent on carries the colour it was
//    decoded under, which lets EXE drop those fetched down the wrong path.
//
//  * MOVC A,@A+DPTR and MOVC A,@A+PC are also handled here. Like a call, ID
//    waits for an empty pipeline, reads A, DPL and DPH through the arbiter,
//    forms the code address, reads the byte on the code read port and hands OF
//    a MOV A,#byte.
//
// MOVX is not executed: it is skipped as a NOP of its length, as is the
// undefined opcode A5h.
//
// Interface: IF byte channel (if_valid/if_byte/if_pc/if_ready), redirect to IF,
// valid/ready channel to OF (out_valid/out/out_ready), jmp from WB, a read port
// to the arbiter, and 'pending' (instructions between OF and the end of WB) from
// MEM_INTERFACE, and the code read port for MOVC (code_rd/code_addr out, the
// byte back on code_data one cycle later). One byte is taken per cycle.
//
// The split into ID1/ID2, the three control codes and the colour bit follow the
// design. The way calls, returns and MOVC are carried out is this
// implementation's own.
module pa_id
  import pa8051_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // IF
  input  logic        if_valid,
  input  logic [7:0]  if_byte,
  input  logic [15:0] if_pc,
  output logic        if_ready,
  output logic        redirect,
  output logic [15:0] redirect_pc,
  // OF
  output logic        out_valid,
  output id2of_t      out,
  input  logic        out_ready,
  // WB
  input  logic        jmp,
  input  logic [15:0] jmp_addr,
  // memory read through the arbiter
  output logic        mr_req,
  output mem_read_t   mr_read,
  input  logic        mr_gnt,
  input  mem_rdata_t  mr_data,
  input  logic [1:0]  pending,
  // code read port (MOVC)
  output logic        code_rd,
  output logic [15:0] code_addr,
  input  logic [7:0]  code_data
);

  typedef enum logic [2:0] {K_PIPE, K_SKIP, K_JUMP, K_CALL, K_RET, K_MOVC} ikind_e;

  typedef struct packed {
    ikind_e      kind;
    id2of_t      d;
    logic [15:0] target;
  } dec_t;

  // ---------------------------------------------------------------- ID1: length
  function automatic logic [1:0] ilen(input logic [7:0] op);
    logic [3:0] hi, lo;
    hi = op[7:4];
    lo = op[3:0];
    unique case (lo)
      4'h0: return (hi inside {4'h1, 4'h2, 4'h3, 4'h9}) ? 2'd3
                 : (hi inside {4'h0, 4'hE, 4'hF}) ? 2'd1 : 2'd2;
      4'h1: return 2'd2;
      4'h2: return (hi inside {4'h0, 4'h1}) ? 2'd3
                 : (hi inside {4'h2, 4'h3, 4'hE, 4'hF}) ? 2'd1 : 2'd2;
      4'h3: return (hi inside {4'h4, 4'h5, 4'h6}) ? 2'd3 : 2'd1;
      4'h4: return (hi == 4'hB) ? 2'd3
                 : (hi inside {4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'h7, 4'h9}) ? 2'd2 : 2'd1;
      4'h5: return (hi inside {4'h7, 4'h8, 4'hB, 4'hD}) ? 2'd3 : (hi == 4'hA) ? 2'd1 : 2'd2;
      4'h6, 4'h7:
            return (hi == 4'hB) ? 2'd3 : (hi inside {4'h7, 4'h8, 4'hA}) ? 2'd2 : 2'd1;
      default:
            return (hi == 4'hB) ? 2'd3 : (hi inside {4'h7, 4'h8, 4'hA, 4'hD}) ? 2'd2 : 2'd1;
    endcase
  endfunction

  function automatic logic [15:0] rel(input logic [15:0] pcn, input logic [7:0] r);
    return pcn + {{8{r[7]}}, r};
  endfunction

  // ---------------------------------------------------------------- ID2: decode
  function automatic dec_t decode(input logic [7:0] op, input logic [7:0] b1,
                                  input logic [7:0] b2, input logic [15:0] pcn,
                                  input logic col);
    dec_t       r;
    logic [3:0] hi, lo;
    hi = op[7:4];
    lo = op[3:0];
    r = '0;
    r.kind        = K_PIPE;
    r.d.opcode    = OP_NOP;
    r.d.rd.ctrl   = RD_NO;
    r.d.rd.maddr  = b1;
    r.d.rd.raddr  = (lo >= 4'h8) ? op[2:0] : {2'b00, op[0]};
    r.d.rd.immed  = b1;
    r.d.rd.immed2 = b2;
    r.d.rd.wsel   = WS_NONE;
    r.d.rd.wdir   = b1;
    r.d.rd.d1dir  = NO_ADDR;
    r.d.wr.ctrl   = WR_NO;
    r.d.wr.jaddr  = rel(pcn, b1);
    r.d.bitidx    = b1[2:0];
    r.d.color     = col;

    // arithmetic and logic with A: ADD ADDC ORL ANL XRL SUBB
    if (hi inside {4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'h9} && lo >= 4'h4) begin
      unique case (hi)
        4'h2: r.d.opcode = OP_ADD;
        4'h3: r.d.opcode = OP_ADDC;
        4'h4: r.d.opcode = OP_OR;
        4'h5: r.d.opcode = OP_AND;
        4'h6: r.d.opcode = OP_XOR;
        default: r.d.opcode = OP_SUB;
      endcase
      r.d.wr.ctrl = WR_ACC;
      if (lo == 4'h4)      r.d.rd.ctrl = RD_ACC_IMM;
      else if (lo == 4'h5) r.d.rd.ctrl = RD_ACC_MEM;
      else if (lo <= 4'h7) r.d.rd.ctrl = RD_ACC_REGI;
      else                 r.d.rd.ctrl = RD_ACC_REG;
      return r;
    end
    // ORL/ANL/XRL dir,A and dir,#data
    if (hi inside {4'h4, 4'h5, 4'h6} && lo inside {4'h2, 4'h3}) begin
      r.d.opcode     = (hi == 4'h4) ? OP_OR : (hi == 4'h5) ? OP_AND : OP_XOR;
      r.d.rd.ctrl    = (lo == 4'h2) ? RD_ACC_MEM : RD_MEM_IMM;
      r.d.rd.immed   = b2;
      r.d.rd.wsel    = WS_DIR;
      r.d.wr.ctrl    = (lo == 4'h2) ? WR_MEM : WR_MEM_WB;
      return r;
    end
    // INC / DEC
    if (hi inside {4'h0, 4'h1} && lo >= 4'h4) begin
      r.d.opcode = (hi == 4'h0) ? OP_INC : OP_DEC;
      if (lo == 4'h4) begin
        r.d.rd.ctrl = RD_ACC;
        r.d.wr.ctrl = WR_ACC;
      end else begin
        r.d.wr.ctrl = WR_MEM;
        if (lo == 4'h5)      begin r.d.rd.ctrl = RD_MEM;  r.d.rd.wsel = WS_DIR;  end
        else if (lo <= 4'h7) begin r.d.rd.ctrl = RD_REGI; r.d.rd.wsel = WS_REGI; end
        else                 begin r.d.rd.ctrl = RD_REG;  r.d.rd.wsel = WS_REG;  end
      end
      return r;
    end
    // the rest of the A-only operations, data moves and jumps
    if (lo >= 4'h8) begin
      unique case (hi)
        4'h7: begin r.d.opcode = OP_MOV; r.d.rd.ctrl = RD_FETCH_REG;
                    r.d.rd.wsel = WS_REG; r.d.wr.ctrl = WR_MEM; end            // MOV Rn,#
        4'h8: begin r.d.opcode = OP_MOV; r.d.rd.ctrl = RD_REG;
                    r.d.rd.wsel = WS_DIR; r.d.wr.ctrl = WR_MEM; end            // MOV dir,Rn
        4'hA: begin r.d.opcode = OP_MOV; r.d.rd.ctrl = RD_MEM;
                    r.d.rd.wsel = WS_REG; r.d.wr.ctrl = WR_MEM; end            // MOV Rn,dir
        4'hB: begin r.d.opcode = OP_CJNE; r.d.rd.ctrl = RD_REG_IMM;
                    r.d.wr.ctrl = WR_CJMP; r.d.wr.jaddr = rel(pcn, b2); end    // CJNE Rn,#,rel
        4'hC: begin r.d.opcode = OP_XCH; r.d.rd.ctrl = RD_XCH_R;
                    r.d.rd.wsel = WS_REG; r.d.wr.ctrl = WR_ACC_MEM; end        // XCH A,Rn
        4'hD: begin r.d.opcode = OP_DJNZ; r.d.rd.ctrl = RD_REG_WB;
                    r.d.rd.wsel = WS_REG; r.d.wr.ctrl = WR_JMP_MEM; end        // DJNZ Rn,rel
        4'hE: begin r.d.opcode = OP_MOV; r.d.rd.ctrl = RD_REG;
                    r.d.wr.ctrl = WR_ACC; end                                  // MOV A,Rn
        4'hF: begin r.d.opcode = OP_MOV; r.d.rd.ctrl = RD_ACC_REGB;
                    r.d.rd.wsel = WS_REG; r.d.wr.ctrl = WR_MEM; end            // MOV Rn,A
        default: r.kind = K_SKIP;
      endcase
      return r;
    end
    if (lo inside {4'h6, 4'h7}) begin
      unique case (hi)
        4'h7: begin r.d.opcode = OP_MOV; r.d.rd.ctrl = RD_IMM_REGB;
                    r.d.rd.wsel = WS_REGI; r.d.wr.ctrl = WR_MEM; end           // MOV @Ri,#
        4'h8: begin r.d.opcode = OP_MOV; r.d.rd.ctrl = RD_REGI;
                    r.d.rd.wsel = WS_DIR; r.d.wr.ctrl = WR_MEM; end            // MOV dir,@Ri
        4'hA: begin r.d.opcode = OP_MOV; r.d.rd.ctrl = RD_REG_MEM;
                    r.d.rd.wsel = WS_REGI; r.d.wr.ctrl = WR_MEM; end           // MOV @Ri,dir
        4'hB: begin r.d.opcode = OP_CJNE; r.d.rd.ctrl = RD_REGI_IMM;
                    r.d.wr.ctrl = WR_CJMP; r.d.wr.jaddr = rel(pcn, b2); end    // CJNE @Ri,#,rel
        4'hC: begin r.d.opcode = OP_XCH; r.d.rd.ctrl = RD_XCH_RI;
                    r.d.rd.wsel = WS_REGI; r.d.wr.ctrl = WR_ACC_MEM; end       // XCH A,@Ri
        4'hD: begin r.d.opcode = OP_XCHD; r.d.rd.ctrl = RD_XCH_RI;
                    r.d.rd.wsel = WS_REGI; r.d.wr.ctrl = WR_ACC_MEM; end       // XCHD A,@Ri
        4'hE: begin r.d.opcode = OP_MOV; r.d.rd.ctrl = RD_REGI;
                    r.d.wr.ctrl = WR_ACC; end                                  // MOV A,@Ri
        4'hF: begin r.d.opcode = OP_MOV; r.d.rd.ctrl = RD_ACC_REGB;
                    r.d.rd.wsel = WS_REGI; r.d.wr.ctrl = WR_MEM; end           // MOV @Ri,A
        default: r.kind = K_SKIP;
      endcase
      return r;
    end
    if (lo == 4'h1) begin                                                       // AJMP / ACALL
      r.kind   = op[4] ? K_CALL : K_JUMP;
      r.target = {pcn[15:11], op[7:5], b1};
      return r;
    end
    unique case (op)
      8'h00: r.kind = K_SKIP;                                                   // NOP
      8'h02: begin r.kind = K_JUMP; r.target = {b1, b2}; end                    // LJMP
      8'h12: begin r.kind = K_CALL; r.target = {b1, b2}; end                    // LCALL
      8'h22, 8'h32: r.kind = K_RET;                                             // RET, RETI
      8'h80: begin r.kind = K_JUMP; r.target = rel(pcn, b1); end                // SJMP
      8'h03: begin r.d.opcode = OP_RR;   r.d.rd.ctrl = RD_ACC; r.d.wr.ctrl = WR_ACC; end
      8'h13: begin r.d.opcode = OP_RRC;  r.d.rd.ctrl = RD_ACC; r.d.wr.ctrl = WR_ACC; end
      8'h23: begin r.d.opcode = OP_RL;   r.d.rd.ctrl = RD_ACC; r.d.wr.ctrl = WR_ACC; end
      8'h33: begin r.d.opcode = OP_RLC;  r.d.rd.ctrl = RD_ACC; r.d.wr.ctrl = WR_ACC; end
      8'hC4: begin r.d.opcode = OP_SWAP; r.d.rd.ctrl = RD_ACC; r.d.wr.ctrl = WR_ACC; end
      8'hD4: begin r.d.opcode = OP_DA;   r.d.rd.ctrl = RD_ACC; r.d.wr.ctrl = WR_ACC; end
      8'hE4: begin r.d.opcode = OP_CLRA; r.d.rd.ctrl = RD_ACC; r.d.wr.ctrl = WR_ACC; end
      8'hF4: begin r.d.opcode = OP_NOT;  r.d.rd.ctrl = RD_ACC; r.d.wr.ctrl = WR_ACC; end
      8'hA4, 8'h84: begin                                                       // MUL AB, DIV AB
        r.d.opcode   = (op == 8'hA4) ? OP_MUL : OP_DIV;
        r.d.rd.ctrl  = RD_ACC_MEM;
        r.d.rd.maddr = A_B;
        r.d.rd.wsel  = WS_DIR;
        r.d.rd.wdir  = A_B;
        r.d.wr.ctrl  = WR_ACC_MEM;
      end
      8'h10, 8'h20, 8'h30: begin                                                // JBC JB JNB
        r.d.opcode   = (op == 8'h10) ? OP_BCMPNZC : (op == 8'h20) ? OP_BCMPZ : OP_BCMPNZ;
        r.d.rd.ctrl  = RD_MEMB;
        r.d.wr.jaddr = rel(pcn, b2);
        if (op == 8'h10) begin
          r.d.rd.wsel = WS_BIT;
          r.d.wr.ctrl = WR_JMP_MEMWB;
        end else begin
          r.d.wr.ctrl = WR_CJMP;
        end
      end
      8'h40: begin r.d.opcode = OP_JC;    r.d.wr.ctrl = WR_CJMP; end
      8'h50: begin r.d.opcode = OP_JNC;   r.d.wr.ctrl = WR_CJMP; end
      8'h60: begin r.d.opcode = OP_CMPZ;  r.d.rd.ctrl = RD_ACC; r.d.wr.ctrl = WR_CJMP; end
      8'h70: begin r.d.opcode = OP_CMPNZ; r.d.rd.ctrl = RD_ACC; r.d.wr.ctrl = WR_CJMP; end
      8'h73: begin r.d.opcode = OP_NOP;   r.d.rd.ctrl = RD_DPTR_ACC; r.d.wr.ctrl = WR_JMP; end
      8'hB4, 8'hB5: begin                                                       // CJNE A,#/dir,rel
        r.d.opcode   = OP_CJNE;
        r.d.rd.ctrl  = (op == 8'hB4) ? RD_ACC_IMM : RD_ACC_MEM;
        r.d.wr.ctrl  = WR_CJMP;
        r.d.wr.jaddr = rel(pcn, b2);
      end
      8'hD5: begin r.d.opcode = OP_DJNZ; r.d.rd.ctrl = RD_MEM_WB; r.d.rd.wsel = WS_DIR;
                   r.d.wr.ctrl = WR_JMP_MEM; r.d.wr.jaddr = rel(pcn, b2); end   // DJNZ dir,rel
      8'hC3: begin r.d.opcode = OP_CLRC; r.d.wr.ctrl = WR_CY; end
      8'hD3: begin r.d.opcode = OP_SETC; r.d.wr.ctrl = WR_CY; end
      8'hB3: begin r.d.opcode = OP_CPLC; r.d.wr.ctrl = WR_CY; end
      8'hC2, 8'hD2, 8'hB2, 8'h92: begin                                         // CLR/SETB/CPL bit, MOV bit,C
        r.d.opcode  = (op == 8'hC2) ? OP_CLRB : (op == 8'hD2) ? OP_SETB
                    : (op == 8'hB2) ? OP_CPLB : OP_MOVB;
        r.d.rd.ctrl = RD_MEMB;
        r.d.rd.wsel = WS_BIT;
        r.d.wr.ctrl = WR_MEMWB;
      end
      8'h72, 8'h82, 8'hA0, 8'hB0, 8'hA2: begin                                  // C with bit
        r.d.opcode  = (op == 8'h72) ? OP_ORC : (op == 8'h82) ? OP_ANLC
                    : (op == 8'hA0) ? OP_ORLNC : (op == 8'hB0) ? OP_ANLNC : OP_MOVC;
        r.d.rd.ctrl = RD_MEMB;
        r.d.wr.ctrl = WR_CY;
      end
      8'h74: begin r.d.opcode = OP_MOV; r.d.rd.ctrl = RD_IMM; r.d.wr.ctrl = WR_ACC; end // MOV A,#
      8'h75: begin r.d.opcode = OP_MOV; r.d.rd.ctrl = RD_IMM; r.d.rd.immed = b2;
                   r.d.rd.wsel = WS_DIR; r.d.wr.ctrl = WR_MEM; end                   // MOV dir,#
      8'h85: begin r.d.opcode = OP_MOV; r.d.rd.ctrl = RD_MEM; r.d.rd.wsel = WS_DIR;
                   r.d.rd.wdir = b2; r.d.wr.ctrl = WR_MEM; end                       // MOV dir,dir
      8'h90: begin r.d.opcode = OP_MOV; r.d.rd.ctrl = RD_IMM16; r.d.rd.immed = b2;
                   r.d.rd.immed2 = b1; r.d.rd.d1dir = A_DPL; r.d.rd.wsel = WS_DIR;
                   r.d.rd.wdir = A_DPH; r.d.wr.ctrl = WR_DPTR; end                   // MOV DPTR,#
      8'hA3: begin r.d.opcode = OP_INC16; r.d.rd.ctrl = RD_DPTR; r.d.rd.d1dir = A_DPL;
                   r.d.rd.wsel = WS_DIR; r.d.rd.wdir = A_DPH; r.d.wr.ctrl = WR_DPTR; end // INC DPTR
      8'hC5: begin r.d.opcode = OP_XCH; r.d.rd.ctrl = RD_XCH_M; r.d.rd.wsel = WS_DIR;
                   r.d.wr.ctrl = WR_ACC_MEM; end                                     // XCH A,dir
      8'hE5: begin r.d.opcode = OP_MOV; r.d.rd.ctrl = RD_MEM; r.d.wr.ctrl = WR_ACC; end // MOV A,dir
      8'hF5: begin r.d.opcode = OP_MOV; r.d.rd.ctrl = RD_ACC; r.d.rd.wsel = WS_DIR;
                   r.d.wr.ctrl = WR_MEM; end                                         // MOV dir,A
      8'hC0: begin r.d.opcode = OP_INC; r.d.rd.ctrl = RD_SP_MEM; r.d.rd.wsel = WS_SP1;
                   r.d.wr.ctrl = WR_SP_MEM; end                                      // PUSH dir
      8'hD0: begin r.d.opcode = OP_DEC; r.d.rd.ctrl = RD_SP_SPI; r.d.rd.wsel = WS_DIR;
                   r.d.wr.ctrl = WR_SP_MEM; end                                      // POP dir
      8'h83: begin r.kind = K_MOVC; r.target = pcn; end                            // MOVC A,@A+PC
      8'h93: begin r.kind = K_MOVC; r.target = 16'h0000; end                       // MOVC A,@A+DPTR
      default: r.kind = K_SKIP;  // MOVX, A5h
    endcase
    return r;
  endfunction

  // ---------------------------------------------------------------- state
  typedef enum logic [2:0] {S_RUN, S_CALL_RD, S_CALL_SP, S_RET_RD, S_MOVC_RD, S_MOVC_ROM}
    state_e;
  state_e      st;
  logic        col;
  logic [1:0]  n;          // bytes collected so far
  logic [7:0]  b0, b1;
  logic [15:0] ret_pc;
  logic [7:0]  new_sp;
  logic        movc_pc;    // MOVC A,@A+PC: the base is ret_pc, not DPTR

  // the instruction completed by the byte now offered by IF
  logic [7:0]  c_op, c_b1, c_b2;
  logic        last;
  dec_t        dec;
  always_comb begin
    c_op = (n == 2'd0) ? if_byte : b0;
    c_b1 = (n == 2'd1) ? if_byte : b1;
    c_b2 = if_byte;
    last = (n == ilen(c_op) - 2'd1);
    dec  = decode(c_op, c_b1, c_b2, if_pc + 16'd1, col);
  end

  logic out_free;
  assign out_free = !out_valid || out_ready;

  logic complete;   // an instruction finishes in ID1 this cycle
  always_comb begin
    if_ready = 1'b0;
    if (st == S_RUN && !jmp)
      if_ready = !last || dec.kind != K_PIPE || out_free;
    complete = if_valid && if_ready && last;
  end

  // memory reads for calls, returns and MOVC, once the pipeline is empty
  logic drained;
  assign drained = !out_valid && pending == 2'd0;
  always_comb begin
    mr_req          = drained && (st inside {S_CALL_RD, S_RET_RD, S_MOVC_RD}) && !jmp;
    mr_read         = '0;
    if (st == S_MOVC_RD) begin
      mr_read.s1    = '{kind: K_DIR, addr: A_ACC};
      mr_read.s2    = '{kind: K_DIR, addr: A_DPL};
      mr_read.s3    = '{kind: K_DIR, addr: A_DPH};
    end else begin
      mr_read.s1    = '{kind: K_DIR, addr: A_SP};
      mr_read.s2    = '{kind: (st == S_RET_RD) ? K_SPI : K_NONE, addr: 8'h00};
      mr_read.s3    = '{kind: (st == S_RET_RD) ? K_SPM : K_NONE, addr: 8'h00};
    end
    mr_read.w       = '{kind: K_NONE, addr: 8'h00};
    mr_read.d1addr  = NO_ADDR;
    mr_read.color   = col;
  end

  always_comb begin
    redirect    = 1'b0;
    redirect_pc = 16'h0000;
    if (jmp) begin
      redirect    = 1'b1;
      redirect_pc = jmp_addr;
    end else if (complete && dec.kind inside {K_JUMP, K_CALL}) begin
      redirect    = 1'b1;
      redirect_pc = dec.target;
    end else if (st == S_RET_RD && mr_gnt) begin
      redirect    = 1'b1;
      redirect_pc = {mr_data.d2, mr_data.d3};
    end
  end

  // MOVC: the code byte at A plus DPTR or plus the address after the MOVC
  assign code_rd   = st == S_MOVC_RD && mr_gnt;
  assign code_addr = (movc_pc ? ret_pc : {mr_data.d3, mr_data.d2}) + {8'h00, mr_data.d1};

  // a data move of one immediate byte to a direct address
  function automatic id2of_t mov_imm(input logic [7:0] dst, input logic [7:0] v,
                                     input logic c);
    id2of_t d;
    d = '0;
    d.opcode    = OP_MOV;
    d.rd.ctrl   = RD_IMM;
    d.rd.immed  = v;
    d.rd.wsel   = WS_DIR;
    d.rd.wdir   = dst;
    d.rd.d1dir  = NO_ADDR;
    d.wr.ctrl   = WR_MEM;
    d.color     = c;
    return d;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= S_RUN;
      col       <= 1'b0;
      n         <= 2'd0;
      b0        <= 8'h00;
      b1        <= 8'h00;
      ret_pc    <= 16'h0000;
      new_sp    <= 8'h00;
      movc_pc   <= 1'b0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (jmp) begin
        col <= ~col;
        n   <= 2'd0;
        st  <= S_RUN;
      end else begin
        unique case (st)
          S_RUN: if (if_valid && if_ready) begin
            if (!last) begin
              if (n == 2'd0) b0 <= if_byte;
              else           b1 <= if_byte;
              n <= n + 2'd1;
            end else begin
              n <= 2'd0;
              unique case (dec.kind)
                K_PIPE: begin out_valid <= 1'b1; out <= dec.d; end
                K_CALL: begin st <= S_CALL_RD; ret_pc <= if_pc + 16'd1; end
                K_RET:  st <= S_RET_RD;
                K_MOVC: begin
                  st      <= S_MOVC_RD;
                  ret_pc  <= dec.target;
                  movc_pc <= c_op == 8'h83;
                end
                default: ;
              endcase
            end
          end
          S_CALL_RD: if (mr_gnt) begin
            // store the return address at SP+1 (low) and SP+2 (high)
            id2of_t d;
            d = mov_imm({1'b0, 7'(mr_data.d1[6:0] + 7'd2)}, ret_pc[15:8], col);
            d.rd.ctrl   = RD_IMM16;
            d.rd.immed  = ret_pc[7:0];
            d.rd.immed2 = ret_pc[15:8];
            d.rd.d1dir  = {1'b0, 7'(mr_data.d1[6:0] + 7'd1)};
            d.wr.ctrl   = WR_DPTR;
            out_valid <= 1'b1;
            out       <= d;
            new_sp    <= mr_data.d1 + 8'd2;
            st        <= S_CALL_SP;
          end
          S_CALL_SP: if (out_free) begin
            out_valid <= 1'b1;
            out       <= mov_imm(A_SP, new_sp, col);
            st        <= S_RUN;
          end
          S_RET_RD: if (mr_gnt) begin
            out_valid <= 1'b1;
            out       <= mov_imm(A_SP, mr_data.d1 - 8'd2, col);
            st        <= S_RUN;
          end
          S_MOVC_RD: if (mr_gnt) st <= S_MOVC_ROM;
          S_MOVC_ROM: begin
            // the byte arrives now; OF is free because the pipeline is empty
            id2of_t d;
            d = mov_imm(NO_ADDR, code_data, col);
            d.rd.wsel = WS_NONE;
            d.wr.ctrl = WR_ACC;
            out_valid <= 1'b1;
            out       <= d;
            st        <= S_RUN;
          end
          default: st <= S_RUN;
        endcase
      end
    end
  end

  // ID reads never carry a write address or a forward code
  logic unused;
  assign unused = ^{mr_data.waddr, mr_data.fwd};

endmodule
