// tb_pa_of: checks the operand-fetch stage for every read control.
//
// Random ID records (random read control, addresses, immediates, write-back
// selector, write control) are offered with a random grant from the arbiter. The
// testbench checks
//  * the MemRead request: which location each of src1/src2/src3 reads, the
//    write-back address kind, the dest1 address and the flag-writer bit, against
//    a table of the read controls written out here;
//  * the handshake: in_ready follows the grant, out_valid appears one cycle after
//    a grant and only then;
//  * the operand multiplexer: src1/src2 come from the immediates or from the
//    returned data, src3 is the resolved write address or DPH, and the forward
//    code, colour, opcode and WriteIn are passed on.
module tb_pa_of;
  import pa8051_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       in_valid, in_ready, mr_req, mr_gnt, out_valid;
  id2of_t     in;
  mem_read_t  mr_read;
  mem_rdata_t mr_data;
  of2exe_t    out;

  pa_of dut (.clk, .rst_n, .in_valid, .in, .in_ready, .mr_req, .mr_read, .mr_gnt,
             .mr_data, .out_valid, .out);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (ctrl %s)", what, in.rd.ctrl.name());
    end
  endtask

  // expected (kind, address) of each slot
  typedef struct { acc_kind_e k; logic [7:0] a; } slot_t;
  function automatic void expect_slots(input of_read_t r, output slot_t s1, output slot_t s2,
                                       output slot_t s3);
    slot_t acc  = '{K_DIR, A_ACC};
    slot_t rg   = '{K_REG, {5'b0, r.raddr}};
    slot_t rgi  = '{K_REGI, {5'b0, r.raddr}};
    slot_t m    = '{K_DIR, r.maddr};
    slot_t none = '{K_NONE, 8'h00};
    s1 = none; s2 = none; s3 = none;
    case (r.ctrl)
      RD_ACC, RD_ACC_REGB:    begin s1 = acc; s2 = acc; end
      RD_REG, RD_REG_WB:      begin s1 = rg;  s2 = rg;  end
      RD_REGI:                begin s1 = rgi; s2 = rgi; end
      RD_ACC_REG, RD_XCH_R:   begin s1 = acc; s2 = rg;  end
      RD_ACC_REGI, RD_XCH_RI: begin s1 = acc; s2 = rgi; end
      RD_ACC_MEM, RD_XCH_M:   begin s1 = acc; s2 = m;   end
      RD_MEMB:                begin s1 = '{K_BIT, r.maddr}; s2 = '{K_BIT, r.maddr}; end
      RD_REG_MEM:             s2 = m;
      RD_SP_SPI:              begin s1 = '{K_DIR, A_SP}; s2 = '{K_SPI, 8'h00}; end
      RD_SP_MEM:              begin s1 = '{K_DIR, A_SP}; s2 = m; end
      RD_DPTR_ACC:            begin s1 = acc; s2 = '{K_DIR, A_DPL}; s3 = '{K_DIR, A_DPH}; end
      RD_ACC_IMM:             s1 = acc;
      RD_MEM, RD_MEM_WB:      begin s1 = m; s2 = m; end
      RD_MEM_IMM:             s1 = m;
      RD_REG_IMM:             s1 = rg;
      RD_REGI_IMM:            s1 = rgi;
      RD_DPTR:                begin s1 = '{K_DIR, A_DPL}; s2 = '{K_DIR, A_DPH}; end
      default: ;
    endcase
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    slot_t e1, e2, e3;
    bit granted;
    id2of_t sent;
    mem_rdata_t data;
    logic [7:0] e_src1, e_src2;
    rst_n = 1'b0;
    in_valid = 1'b0; in = '0; mr_gnt = 1'b0; mr_data = '0;
    granted = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      // a new record only once the previous one has been taken
      if (!in_valid || granted) begin
        in = '0;
        in.opcode     = exe_op_e'($urandom_range(0, 43));
        in.rd.ctrl    = read_ctrl_e'($urandom_range(0, 28));
        in.rd.maddr   = 8'($urandom);
        in.rd.raddr   = 3'($urandom);
        in.rd.immed   = 8'($urandom);
        in.rd.immed2  = 8'($urandom);
        in.rd.wsel    = wsel_e'($urandom_range(0, 5));
        in.rd.wdir    = 8'($urandom);
        in.rd.d1dir   = 8'($urandom);
        in.wr.ctrl    = write_ctrl_e'($urandom_range(0, 12));
        in.wr.jaddr   = 16'($urandom);
        in.bitidx     = 3'($urandom);
        in.color      = 1'($urandom);
        in_valid      = $urandom_range(0, 4) != 0;
      end
      mr_gnt  = in_valid && $urandom_range(0, 2) != 0;
      mr_data = '{d1: 8'($urandom), d2: 8'($urandom), d3: 8'($urandom), waddr: 8'($urandom),
                  fwd: '{s1: fwd_sel_e'($urandom_range(0, 2)), s2: fwd_sel_e'($urandom_range(0, 2))}};
      #1;
      check("request follows valid", mr_req == in_valid);
      check("ready follows grant", in_ready == mr_gnt);
      if (in_valid) begin
        expect_slots(in.rd, e1, e2, e3);
        check("src1 location", mr_read.s1.kind == e1.k && (e1.k == K_NONE || mr_read.s1.addr == e1.a));
        check("src2 location", mr_read.s2.kind == e2.k && (e2.k == K_NONE || mr_read.s2.addr == e2.a));
        check("src3 location", mr_read.s3.kind == e3.k && (e3.k == K_NONE || mr_read.s3.addr == e3.a));
        case (in.rd.wsel)
          WS_REG:  check("write reg",  mr_read.w.kind == K_REG  && mr_read.w.addr[2:0] == in.rd.raddr);
          WS_REGI: check("write @Ri",  mr_read.w.kind == K_REGI && mr_read.w.addr[0] == in.rd.raddr[0]);
          WS_DIR:  check("write dir",  mr_read.w.kind == K_DIR  && mr_read.w.addr == in.rd.wdir);
          WS_BIT:  check("write bit",  mr_read.w.kind == K_BIT  && mr_read.w.addr == in.rd.maddr);
          WS_SP1:  check("write SP+1", mr_read.w.kind == K_SP1);
          default: check("write none", mr_read.w.kind == K_NONE);
        endcase
        case (in.wr.ctrl)
          WR_ACC, WR_ACC_MEM: check("dest1 ACC", mr_read.d1addr == A_ACC);
          WR_DPTR:            check("dest1 d1dir", mr_read.d1addr == in.rd.d1dir);
          WR_SP_MEM:          check("dest1 SP", mr_read.d1addr == A_SP);
          default:            check("no dest1", mr_read.d1addr == NO_ADDR);
        endcase
        check("flag writer", mr_read.wflags == (in.opcode inside {OP_ADD, OP_ADDC, OP_SUB,
              OP_CJNE, OP_MUL, OP_DIV, OP_DA, OP_RLC, OP_RRC, OP_CPLC, OP_CLRC, OP_SETC,
              OP_ORC, OP_ANLC, OP_ORLNC, OP_ANLNC, OP_MOVC}));
        check("lock and colour", mr_read.lock && mr_read.color == in.color);
      end
      granted = in_valid && mr_gnt;
      sent = in;
      data = mr_data;
      @(posedge clk);
      #1;
      check("out_valid after grant", out_valid == granted);
      if (granted) begin
        e_src1 = (sent.rd.ctrl inside {RD_IMM, RD_FETCH_REG, RD_IMM_REGB, RD_IMM16}) ? sent.rd.immed : data.d1;
        e_src2 = (sent.rd.ctrl == RD_IMM16) ? sent.rd.immed2 :
                 (sent.rd.ctrl inside {RD_ACC_IMM, RD_MEM_IMM, RD_REG_IMM, RD_REGI_IMM, RD_IMM,
                                       RD_FETCH_REG, RD_IMM_REGB}) ? sent.rd.immed : data.d2;
        check("src1", out.src1 == e_src1);
        check("src2", out.src2 == e_src2);
        check("src3", out.src3 == ((sent.rd.ctrl == RD_DPTR_ACC) ? data.d3 : data.waddr));
        check("pass-through", out.opcode == sent.opcode && out.wr == sent.wr &&
              out.bitidx == sent.bitidx && out.color == sent.color && out.fwd == data.fwd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
