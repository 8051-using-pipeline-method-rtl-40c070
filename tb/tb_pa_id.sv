// tb_pa_id: checks decoding and the control flow handled in the decode stage.
//
// A small program is fed byte by byte from a fetch model with random gaps; OF
// takes records with a random ready, each taken record counts as pending in the
// later stages for two cycles, and an arbiter model answers ID's memory reads
// after a random delay (SP = 07h, and 01h/03h as the stacked return address).
// The records leaving ID are compared, in order, with the list expected for the
// program:
//   MOV A,#55h / NOP (dropped) / MOV 30h,#0AAh / SJMP over MOV A,40h /
//   CJNE A,#10h,rel / LJMP 0100h / LCALL 0200h (two stack moves) / RET (one SP
//   move, return to 0103h) / MUL AB / AJMP 0150h / JC $ / POP ACC /
//   MOVC A,@A+DPTR / MOVC A,@A+PC / SJMP $
// For MOVC the arbiter model gives A = 07h and DPTR = 0301h; a code-port model
// returns the ROM byte a cycle later, and ID must hand on MOV A,#byte.
// Then a taken jump is reported from WB: ID must redirect, flip its colour and
// deliver CLR A from the new target with the new colour. Memory reads must only
// be issued when the pipeline behind ID is empty.
module tb_pa_id;
  import pa8051_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        if_valid, if_ready, redirect, out_valid, out_ready, jmp;
  logic        mr_req, mr_gnt;
  logic [7:0]  if_byte;
  logic [15:0] if_pc, redirect_pc, jmp_addr;
  id2of_t      out;
  mem_read_t   mr_read;
  mem_rdata_t  mr_data;
  logic [1:0]  pending;
  logic        code_rd;
  logic [15:0] code_addr;
  logic [7:0]  code_data;

  pa_id dut (.clk, .rst_n, .if_valid, .if_byte, .if_pc, .if_ready, .redirect, .redirect_pc,
             .out_valid, .out, .out_ready, .jmp, .jmp_addr,
             .mr_req, .mr_read, .mr_gnt, .mr_data, .pending,
             .code_rd, .code_addr, .code_data);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  logic [7:0] rom [4096];

  // fetch model
  logic [15:0] pc;
  logic        gap;
  assign if_valid = !gap;
  assign if_byte  = rom[pc[11:0]];
  assign if_pc    = pc;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc  <= 16'h0000;
      gap <= 1'b0;
    end else begin
      if (redirect) pc <= redirect_pc;
      else if (if_valid && if_ready) pc <= pc + 16'd1;
      gap <= $urandom_range(0, 3) == 0;
    end
  end

  // code read port for MOVC
  logic [15:0] code_seen [$];
  always_ff @(posedge clk) code_data <= rom[code_addr[11:0]];
  always @(posedge clk) if (rst_n && code_rd) begin
    code_seen.push_back(code_addr);
    check("MOVC reads A, DPL and DPH", mr_read.s1.addr == A_ACC && mr_read.s2.addr == A_DPL &&
                                       mr_read.s3.addr == A_DPH);
  end

  // later stages: each record taken by OF stays pending for two cycles
  logic [1:0] age0, age1;
  always_ff @(posedge clk) begin
    if (!rst_n) begin age0 <= 2'd0; age1 <= 2'd0; end
    else begin
      age1 <= age0;
      age0 <= (out_valid && out_ready) ? 2'd1 : 2'd0;
    end
  end
  assign pending = age0 + age1;
  always_ff @(posedge clk) out_ready <= rst_n && $urandom_range(0, 2) != 0;

  // arbiter model
  int delay;
  always_ff @(posedge clk) delay <= rst_n ? $urandom_range(0, 2) : 0;
  assign mr_gnt = mr_req && delay == 0;
  always_comb begin
    mr_data = '0;
    mr_data.d1 = (mr_read.s2.kind == K_SPI) ? 8'h09 : 8'h07;
    mr_data.d2 = 8'h01;
    mr_data.d3 = 8'h03;
  end

  always @(posedge clk) if (rst_n && mr_req) check("read only when drained", pending == 0 && !out_valid);

  // expected records
  typedef struct {
    exe_op_e     op;
    read_ctrl_e  rc;
    write_ctrl_e wc;
    logic [7:0]  imm;
    logic [7:0]  a;      // wdir or maddr, whichever the record uses
    logic        col;
  } rec_t;
  rec_t exp_q [$];
  int   got = 0;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    rec_t e;
    got++;
    if (exp_q.size() == 0) check($sformatf("unexpected record %s", out.opcode.name()), 0);
    else begin
      e = exp_q.pop_front();
      check($sformatf("record %0d: op %s/%s rd %s/%s wr %s/%s col %0d/%0d", got,
                      out.opcode.name(), e.op.name(), out.rd.ctrl.name(), e.rc.name(),
                      out.wr.ctrl.name(), e.wc.name(), out.color, e.col),
            out.opcode == e.op && out.rd.ctrl == e.rc && out.wr.ctrl == e.wc && out.color == e.col);
      if (e.rc inside {RD_IMM, RD_ACC_IMM, RD_IMM16})
        check($sformatf("record %0d immediate %02h/%02h", got, out.rd.immed, e.imm), out.rd.immed == e.imm);
      if (out.rd.wsel == WS_DIR)
        check($sformatf("record %0d write address %02h/%02h", got, out.rd.wdir, e.a), out.rd.wdir == e.a);
      if (e.op == OP_CJNE) check("CJNE target", out.wr.jaddr == 16'h0012);
      if (e.op == OP_JC)   check("JC target", out.wr.jaddr == 16'h0150);
      if (e.rc == RD_IMM16) check("call stores 0103h at 08h/09h",
                                  out.rd.immed2 == 8'h01 && out.rd.d1dir == 8'h08);
      if (e.op == OP_MUL) check("MUL reads B", out.rd.maddr == A_B);
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    foreach (rom[i]) rom[i] = 8'h00;
    {rom['h000], rom['h001]}             = {8'h74, 8'h55};          // MOV A,#55h
    rom['h002]                           = 8'h00;                   // NOP
    {rom['h003], rom['h004], rom['h005]} = {8'h75, 8'h30, 8'hAA};   // MOV 30h,#0AAh
    {rom['h006], rom['h007]}             = {8'h80, 8'h02};          // SJMP 000Ah
    {rom['h008], rom['h009]}             = {8'hE5, 8'h40};          // MOV A,40h (jumped over)
    {rom['h00A], rom['h00B], rom['h00C]} = {8'hB4, 8'h10, 8'h05};   // CJNE A,#10h,0012h
    {rom['h00D], rom['h00E], rom['h00F]} = {8'h02, 8'h01, 8'h00};   // LJMP 0100h
    {rom['h100], rom['h101], rom['h102]} = {8'h12, 8'h02, 8'h00};   // LCALL 0200h
    rom['h200]                           = 8'h22;                   // RET
    rom['h103]                           = 8'hA4;                   // MUL AB
    {rom['h104], rom['h105]}             = {8'h21, 8'h50};          // AJMP 0150h
    {rom['h150], rom['h151]}             = {8'h40, 8'hFE};          // JC $
    {rom['h152], rom['h153]}             = {8'hD0, 8'hE0};          // POP ACC
    rom['h154]                           = 8'h93;                   // MOVC A,@A+DPTR
    rom['h155]                           = 8'h83;                   // MOVC A,@A+PC
    {rom['h156], rom['h157]}             = {8'h80, 8'hFE};          // SJMP $
    rom['h308]                           = 8'h5A;                   // 0301h + 07h
    rom['h15D]                           = 8'hA6;                   // 0156h + 07h
    rom['h300]                           = 8'hE4;                   // CLR A
    {rom['h301], rom['h302]}             = {8'h80, 8'hFE};          // SJMP $

    exp_q.push_back('{OP_MOV,   RD_IMM,      WR_ACC,     8'h55, 8'h00, 1'b0});
    exp_q.push_back('{OP_MOV,   RD_IMM,      WR_MEM,     8'hAA, 8'h30, 1'b0});
    exp_q.push_back('{OP_CJNE,  RD_ACC_IMM,  WR_CJMP,    8'h10, 8'h00, 1'b0});
    exp_q.push_back('{OP_MOV,   RD_IMM16,    WR_DPTR,    8'h03, 8'h09, 1'b0});
    exp_q.push_back('{OP_MOV,   RD_IMM,      WR_MEM,     8'h09, A_SP,  1'b0});
    exp_q.push_back('{OP_MOV,   RD_IMM,      WR_MEM,     8'h07, A_SP,  1'b0});
    exp_q.push_back('{OP_MUL,   RD_ACC_MEM,  WR_ACC_MEM, 8'h00, A_B,   1'b0});
    exp_q.push_back('{OP_JC,    RD_NO,       WR_CJMP,    8'h00, 8'h00, 1'b0});
    exp_q.push_back('{OP_DEC,   RD_SP_SPI,   WR_SP_MEM,  8'h00, A_ACC, 1'b0});
    exp_q.push_back('{OP_MOV,   RD_IMM,      WR_ACC,     8'h5A, 8'h00, 1'b0});
    exp_q.push_back('{OP_MOV,   RD_IMM,      WR_ACC,     8'hA6, 8'h00, 1'b0});

    rst_n = 1'b0;
    jmp = 1'b0;
    jmp_addr = 16'h0000;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (400) @(posedge clk);
    check("all records before the jump", exp_q.size() == 0);
    check("spinning on SJMP $", pc inside {16'h0156, 16'h0157});
    check("MOVC code addresses", code_seen.size() == 2 && code_seen[0] == 16'h0308 &&
                                 code_seen[1] == 16'h015D);

    // taken jump from WB
    exp_q.push_back('{OP_CLRA, RD_ACC, WR_ACC, 8'h00, 8'h00, 1'b1});
    @(negedge clk);
    jmp = 1'b1;
    jmp_addr = 16'h0300;
    #1;
    check("redirect on jmp", redirect && redirect_pc == 16'h0300);
    @(negedge clk);
    jmp = 1'b0;
    repeat (100) @(posedge clk);
    check("record after the jump", exp_q.size() == 0);
    check("records seen", got == 12);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
