// tb_pa_mem_interface: directed checks of the memory interface and its locks.
//
// MEM_INTERFACE is connected to the data memory. Requests and write-backs are
// driven as OF and WB would drive them. The scenarios check:
//  A. write-back of ACC and of RAM, the parity bit of PSW, direct reads;
//  B. register addressing through the bank bits of PSW;
//  C. forwarding of dest1 (ACC) and dest2 from the newest pending instruction,
//     a stall on an address locked by the older one, release on retire;
//  D. hazard type 2: a pending write of the @Ri pointer stalls an @Ri read;
//  E. hazard type 3: a pending PSW write stalls a register access;
//  F. a pending flag writer stalls a read of PSW;
//  G. a taken jump: the request in that cycle waits, lock addresses are cleared,
//     requests of the old colour are granted without lock or forward;
//  H. reads for ID (no lock entry) leave the pending count alone.
module tb_pa_mem_interface;
  import pa8051_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       req_valid, rsp_valid, wb_valid, jmp;
  mem_read_t  req;
  mem_rdata_t rsp;
  mem_write_t wb_write;
  logic [1:0] pending;
  logic [7:0] acc, psw;
  logic [7:0] m_paddr, m_pdata;
  logic [7:0] m_raddr [3];
  logic [7:0] m_rdata [3];
  logic       m_we    [2];
  logic [7:0] m_waddr [2];
  logic [7:0] m_wdata [2];
  logic [7:0] p0, p1, p2, p3;

  pa_mem_interface dut (.clk, .rst_n, .req_valid, .req, .rsp_valid, .rsp,
                        .wb_valid, .wb_write, .jmp, .pending, .acc_out(acc), .psw_out(psw),
                        .m_paddr, .m_pdata, .m_raddr, .m_rdata, .m_we, .m_waddr, .m_wdata);
  pa_mem mem (.clk, .rst_n, .paddr(m_paddr), .pdata(m_pdata), .raddr(m_raddr), .rdata(m_rdata),
              .we(m_we), .waddr(m_waddr), .wdata(m_wdata),
              .p0_out(p0), .p1_out(p1), .p2_out(p2), .p3_out(p3));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic mem_acc_t acc_of(input acc_kind_e k, input logic [7:0] a);
    return '{kind: k, addr: a};
  endfunction

  // build an OF request
  function automatic mem_read_t mk(input mem_acc_t s1, input mem_acc_t s2, input mem_acc_t w,
                                   input logic [7:0] d1addr, input logic fl, input logic col);
    mem_read_t r;
    r = '0;
    r.s1 = s1; r.s2 = s2; r.s3 = acc_of(K_NONE, 8'h00); r.w = w;
    r.d1addr = d1addr; r.wflags = fl; r.lock = 1'b1; r.color = col;
    return r;
  endfunction

  localparam mem_acc_t NONE = '{kind: K_NONE, addr: 8'h00};

  // present a request for one cycle; returns whether it was granted and the answer
  task automatic request(input mem_read_t r, output bit g, output mem_rdata_t d);
    @(negedge clk);
    req_valid = 1'b1;
    req = r;
    #1;
    g = rsp_valid;
    d = rsp;
    @(posedge clk);
    #1;
    req_valid = 1'b0;
  endtask

  // one instruction leaves WB
  task automatic retire(input logic e1, input logic [7:0] a1, input logic [7:0] d1,
                        input logic e2, input logic [7:0] a2, input logic [7:0] d2,
                        input logic j);
    @(negedge clk);
    wb_valid = 1'b1;
    jmp = j;
    wb_write = '0;
    wb_write.w1_en = e1; wb_write.w1_addr = a1; wb_write.w1_data = d1;
    wb_write.w2_en = e2; wb_write.w2_addr = a2; wb_write.w2_data = d2;
    @(posedge clk);
    #1;
    wb_valid = 1'b0;
    jmp = 1'b0;
  endtask

  task automatic retire_nop();
    retire(1'b0, NO_ADDR, 8'h00, 1'b0, NO_ADDR, 8'h00, 1'b0);
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit g;
    mem_rdata_t d;
    rst_n = 1'b0;
    req_valid = 1'b0; req = '0; wb_valid = 1'b0; wb_write = '0; jmp = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check("empty after reset", pending == 2'd0);

    // A: write-back
    retire(1'b1, A_ACC, 8'h07, 1'b1, 8'h30, 8'h5A, 1'b0);
    check("ACC written", acc == 8'h07);
    check("parity of ACC", psw[0] == 1'b1);
    check("RAM written", mem.ram[8'h30] == 8'h5A);
    request(mk(acc_of(K_DIR, 8'h30), acc_of(K_DIR, A_ACC), NONE, NO_ADDR, 1'b0, 1'b0), g, d);
    check("A: granted", g);
    check("A: direct read", d.d1 == 8'h5A);
    check("A: ACC read", d.d2 == 8'h07);
    check("A: no forward", d.fwd.s1 == FW_NO && d.fwd.s2 == FW_NO);
    retire_nop();
    check("A: drained", pending == 2'd0);

    // B: register bank 1
    retire(1'b0, NO_ADDR, 8'h00, 1'b1, 8'h0B, 8'h33, 1'b0);
    retire(1'b0, NO_ADDR, 8'h00, 1'b1, A_PSW, 8'h08, 1'b0);
    request(mk(acc_of(K_REG, 8'h03), NONE, acc_of(K_REG, 8'h03), NO_ADDR, 1'b0, 1'b0), g, d);
    check("B: R3 of bank 1", g && d.d1 == 8'h33 && d.waddr == 8'h0B);
    retire_nop();
    retire(1'b0, NO_ADDR, 8'h00, 1'b1, A_PSW, 8'h00, 1'b0);

    // C: forwarding and the older lock
    request(mk(acc_of(K_DIR, 8'h30), NONE, acc_of(K_DIR, 8'h40), A_ACC, 1'b0, 1'b0), g, d);
    check("C: first granted", g && pending == 2'd1);
    request(mk(acc_of(K_DIR, A_ACC), acc_of(K_DIR, 8'h40), NONE, NO_ADDR, 1'b0, 1'b0), g, d);
    check("C: second granted", g && pending == 2'd2);
    check("C: ACC forwarded from dest1", d.fwd.s1 == FW_D1);
    check("C: 40h forwarded from dest2", d.fwd.s2 == FW_D2);
    request(mk(acc_of(K_DIR, 8'h40), NONE, NONE, NO_ADDR, 1'b0, 1'b0), g, d);
    check("C: older lock stalls", !g);
    retire(1'b1, A_ACC, 8'h11, 1'b1, 8'h40, 8'h22, 1'b0);
    request(mk(acc_of(K_DIR, 8'h40), NONE, NONE, NO_ADDR, 1'b0, 1'b0), g, d);
    check("C: released", g && d.d1 == 8'h22 && d.fwd.s1 == FW_NO);
    retire_nop();
    retire_nop();
    check("C: drained", pending == 2'd0);

    // D: type 2, @R0 with R0 pending
    retire(1'b0, NO_ADDR, 8'h00, 1'b1, 8'h45, 8'h9C, 1'b0);
    request(mk(NONE, NONE, acc_of(K_REG, 8'h00), NO_ADDR, 1'b0, 1'b0), g, d);
    check("D: pointer write granted", g);
    request(mk(acc_of(K_REGI, 8'h00), NONE, NONE, NO_ADDR, 1'b0, 1'b0), g, d);
    check("D: @R0 stalls", !g);
    retire(1'b0, NO_ADDR, 8'h00, 1'b1, 8'h00, 8'h45, 1'b0);
    request(mk(acc_of(K_REGI, 8'h00), NONE, NONE, NO_ADDR, 1'b0, 1'b0), g, d);
    check("D: @R0 after retire", g && d.d1 == 8'h9C);
    retire_nop();

    // E: type 3, register access with PSW pending
    request(mk(NONE, NONE, acc_of(K_DIR, A_PSW), NO_ADDR, 1'b0, 1'b0), g, d);
    check("E: PSW write granted", g);
    request(mk(acc_of(K_REG, 8'h03), NONE, NONE, NO_ADDR, 1'b0, 1'b0), g, d);
    check("E: register access stalls", !g);
    retire(1'b0, NO_ADDR, 8'h00, 1'b1, A_PSW, 8'h08, 1'b0);
    request(mk(acc_of(K_REG, 8'h03), NONE, NONE, NO_ADDR, 1'b0, 1'b0), g, d);
    check("E: bank 1 after retire", g && d.d1 == 8'h33);
    retire_nop();
    retire(1'b0, NO_ADDR, 8'h00, 1'b1, A_PSW, 8'h00, 1'b0);

    // F: flag writer pending, PSW read
    request(mk(NONE, NONE, NONE, NO_ADDR, 1'b1, 1'b0), g, d);
    check("F: flag writer granted", g);
    request(mk(acc_of(K_DIR, A_PSW), NONE, NONE, NO_ADDR, 1'b0, 1'b0), g, d);
    check("F: PSW read stalls", !g);
    retire_nop();
    request(mk(acc_of(K_DIR, A_PSW), NONE, NONE, NO_ADDR, 1'b0, 1'b0), g, d);
    check("F: PSW read after retire", g);
    retire_nop();

    // G: taken jump
    request(mk(NONE, NONE, NONE, NO_ADDR, 1'b0, 1'b0), g, d);          // the jump
    request(mk(NONE, NONE, acc_of(K_DIR, 8'h50), NO_ADDR, 1'b0, 1'b0), g, d);  // wrong path
    check("G: two pending", pending == 2'd2);
    @(negedge clk);
    wb_valid = 1'b1; jmp = 1'b1; wb_write = '0;
    req_valid = 1'b1;
    req = mk(acc_of(K_DIR, 8'h30), NONE, NONE, NO_ADDR, 1'b0, 1'b1);
    #1;
    check("G: request waits in the jump cycle", !rsp_valid);
    @(posedge clk);
    #1;
    wb_valid = 1'b0; jmp = 1'b0; req_valid = 1'b0;
    request(mk(acc_of(K_DIR, 8'h50), NONE, acc_of(K_DIR, 8'h51), NO_ADDR, 1'b0, 1'b0), g, d);
    check("G: old colour granted without forward", g && d.fwd.s1 == FW_NO);
    retire_nop();
    request(mk(acc_of(K_DIR, 8'h51), acc_of(K_DIR, 8'h50), NONE, NO_ADDR, 1'b0, 1'b1), g, d);
    check("G: no lock left by old colour or jump", g && d.fwd.s1 == FW_NO && d.fwd.s2 == FW_NO);
    retire_nop(); retire_nop();
    check("G: drained", pending == 2'd0);

    // H: ID read of @SP and @(SP-1)
    retire(1'b0, NO_ADDR, 8'h00, 1'b1, 8'h08, 8'h12, 1'b0);
    retire(1'b0, NO_ADDR, 8'h00, 1'b1, 8'h07, 8'h34, 1'b0);
    retire(1'b0, NO_ADDR, 8'h00, 1'b1, A_SP, 8'h08, 1'b0);
    begin
      mem_read_t r;
      r = '0;
      r.s1 = acc_of(K_DIR, A_SP); r.s2 = acc_of(K_SPI, 8'h00); r.s3 = acc_of(K_SPM, 8'h00);
      r.w = NONE; r.d1addr = NO_ADDR; r.lock = 1'b0; r.color = 1'b1;
      request(r, g, d);
    end
    check("H: SP, @SP, @(SP-1)", g && d.d1 == 8'h08 && d.d2 == 8'h12 && d.d3 == 8'h34);
    check("H: no lock entry", pending == 2'd0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
