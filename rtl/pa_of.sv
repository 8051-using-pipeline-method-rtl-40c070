// pa_of: operand fetch (OF) stage of the pipelined 8051.
//
// Its CTRL part turns ReadIn into a MemRead request: which locations feed the EXE
// source operands src1 and src2 (ACC, Rn, @Ri, a direct address, the byte holding
// a bit, SP, @SP, DPL/DPH), which address the result is written back to, and
// which addresses the instruction locks (dest1, dest2, the flags). The request
// goes to the read arbiter and is held until MEM_INTERFACE grants it. Its MUX part
// then builds src1, src2 and src3 from the returned data and the immediates, and
// passes on the forward code, the colour bit, WriteIn and the opcode.
//
// Operand placement: for "read X and Y" controls X lands in src1 and Y in src2;
// a control that reads one value puts it in both, so that a move (dest1 = src1,
// dest2 = src2) delivers it to whichever destination the instruction writes.
// src3 is the resolved write-back address, except for JMP @A+DPTR where it is DPH.
//
// Interface: valid/ready from ID, request/grant to the arbiter, registered
// valid output to EXE. EXE always accepts, so a granted operand fetch moves on
// the next cycle; the stage takes one cycle per instruction when nothing is locked.
//
// The read controls are the design's; their operand placement and the
// request/grant protocol are this implementation's choices.
module pa_of
  import pa8051_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // from ID
  input  logic       in_valid,
  input  id2of_t     in,
  output logic       in_ready,
  // arbiter port
  output logic       mr_req,
  output mem_read_t  mr_read,
  input  logic       mr_gnt,
  input  mem_rdata_t mr_data,
  // to EXE
  output logic       out_valid,
  output of2exe_t    out
);

  function automatic logic writes_flags(input exe_op_e op);
    return op inside {OP_ADD, OP_ADDC, OP_SUB, OP_CJNE, OP_MUL, OP_DIV, OP_DA,
                      OP_RLC, OP_RRC, OP_CPLC, OP_CLRC, OP_SETC, OP_ORC, OP_ANLC,
                      OP_ORLNC, OP_ANLNC, OP_MOVC};
  endfunction

  // ---------------------------------------------------------------- CTRL
  mem_acc_t acc_a, reg_a, regi_a, mem_a, bit_a, none_a;
  always_comb begin
    acc_a  = '{kind: K_DIR,  addr: A_ACC};
    reg_a  = '{kind: K_REG,  addr: {5'b0, in.rd.raddr}};
    regi_a = '{kind: K_REGI, addr: {5'b0, in.rd.raddr}};
    mem_a  = '{kind: K_DIR,  addr: in.rd.maddr};
    bit_a  = '{kind: K_BIT,  addr: in.rd.maddr};
    none_a = '{kind: K_NONE, addr: 8'h00};
  end

  mem_read_t q;
  always_comb begin
    q = '0;
    q.s1 = none_a;
    q.s2 = none_a;
    q.s3 = none_a;
    unique case (in.rd.ctrl)
      RD_ACC, RD_ACC_REGB:          begin q.s1 = acc_a;  q.s2 = acc_a;  end
      RD_REG, RD_REG_WB:            begin q.s1 = reg_a;  q.s2 = reg_a;  end
      RD_REGI:                      begin q.s1 = regi_a; q.s2 = regi_a; end
      RD_ACC_REG, RD_XCH_R:         begin q.s1 = acc_a;  q.s2 = reg_a;  end
      RD_ACC_REGI, RD_XCH_RI:       begin q.s1 = acc_a;  q.s2 = regi_a; end
      RD_ACC_MEM, RD_XCH_M:         begin q.s1 = acc_a;  q.s2 = mem_a;  end
      RD_MEMB:                      begin q.s1 = bit_a;  q.s2 = bit_a;  end
      RD_REG_MEM:                   q.s2 = mem_a;
      RD_SP_SPI: begin q.s1 = '{kind: K_DIR, addr: A_SP}; q.s2 = '{kind: K_SPI, addr: 8'h00}; end
      RD_SP_MEM: begin q.s1 = '{kind: K_DIR, addr: A_SP}; q.s2 = mem_a; end
      RD_DPTR_ACC: begin
        q.s1 = acc_a;
        q.s2 = '{kind: K_DIR, addr: A_DPL};
        q.s3 = '{kind: K_DIR, addr: A_DPH};
      end
      RD_ACC_IMM:                   q.s1 = acc_a;
      RD_MEM, RD_MEM_WB:            begin q.s1 = mem_a;  q.s2 = mem_a;  end
      RD_MEM_IMM:                   q.s1 = mem_a;
      RD_REG_IMM:                   q.s1 = reg_a;
      RD_REGI_IMM:                  q.s1 = regi_a;
      RD_DPTR: begin q.s1 = '{kind: K_DIR, addr: A_DPL}; q.s2 = '{kind: K_DIR, addr: A_DPH}; end
      default: ;  // immediates only, or nothing
    endcase
    unique case (in.rd.wsel)
      WS_REG:  q.w = reg_a;
      WS_REGI: q.w = regi_a;
      WS_DIR:  q.w = '{kind: K_DIR, addr: in.rd.wdir};
      WS_BIT:  q.w = bit_a;
      WS_SP1:  q.w = '{kind: K_SP1, addr: 8'h00};
      default: q.w = none_a;
    endcase
    unique case (in.wr.ctrl)
      WR_ACC, WR_ACC_MEM: q.d1addr = A_ACC;
      WR_DPTR:            q.d1addr = in.rd.d1dir;
      WR_SP_MEM:          q.d1addr = A_SP;
      default:            q.d1addr = NO_ADDR;
    endcase
    q.wflags = writes_flags(in.opcode);
    q.lock   = 1'b1;
    q.color  = in.color;
  end

  assign mr_req   = in_valid;
  assign mr_read  = q;
  assign in_ready = mr_gnt;

  // ---------------------------------------------------------------- MUX
  logic imm1, imm2, immh2;
  always_comb begin
    imm1  = in.rd.ctrl inside {RD_IMM, RD_FETCH_REG, RD_IMM_REGB, RD_IMM16};
    imm2  = in.rd.ctrl inside {RD_ACC_IMM, RD_MEM_IMM, RD_REG_IMM, RD_REGI_IMM,
                               RD_IMM, RD_FETCH_REG, RD_IMM_REGB};
    immh2 = in.rd.ctrl == RD_IMM16;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= in_valid && mr_gnt;
      if (in_valid && mr_gnt) begin
        out.opcode <= in.opcode;
        out.wr     <= in.wr;
        out.src1   <= imm1 ? in.rd.immed : mr_data.d1;
        out.src2   <= immh2 ? in.rd.immed2 : imm2 ? in.rd.immed : mr_data.d2;
        out.src3   <= (in.rd.ctrl == RD_DPTR_ACC) ? mr_data.d3 : mr_data.waddr;
        out.d1addr <= q.d1addr;
        out.bitidx <= in.bitidx;
        out.fwd    <= mr_data.fwd;
        out.color  <= in.color;
      end
    end
  end

endmodule
