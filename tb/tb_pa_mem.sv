// tb_pa_mem: checks the data memory against a reference array.
//
// First every RAM byte is written through both write ports, then random cycles
// write random addresses (RAM, the implemented SFRs and unimplemented SFRs) on
// both ports, sometimes the same address on both, and read four random addresses
// through the pointer port and the three read ports. Every read is compared with
// the reference, which gives port 2 priority and ignores writes to unimplemented
// SFR addresses. Reset values of SP, DPTR, B and the ports are checked first.
module tb_pa_mem;
  import pa8051_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [7:0] paddr, pdata;
  logic [7:0] raddr [3];
  logic [7:0] rdata [3];
  logic       we    [2];
  logic [7:0] waddr [2];
  logic [7:0] wdata [2];
  logic [7:0] p0, p1, p2, p3;

  pa_mem dut (.clk, .rst_n, .paddr, .pdata, .raddr, .rdata, .we, .waddr, .wdata,
              .p0_out(p0), .p1_out(p1), .p2_out(p2), .p3_out(p3));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] model [256];

  function automatic bit implemented(input logic [7:0] a);
    return !a[7] || a inside {A_P0, A_P1, A_P2, A_P3, A_SP, A_DPL, A_DPH, A_B};
  endfunction

  function automatic logic [7:0] expect_rd(input logic [7:0] a);
    return implemented(a) ? model[a] : 8'h00;
  endfunction

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  function automatic logic [7:0] rand_addr();
    int k = $urandom_range(0, 3);
    logic [7:0] sfrs [9] = '{A_P0, A_P1, A_P2, A_P3, A_SP, A_DPL, A_DPH, A_B, 8'hC8};
    if (k == 0) return sfrs[$urandom_range(0, 8)];
    return 8'($urandom_range(0, 127));
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    paddr = 8'h00;
    foreach (raddr[i]) raddr[i] = 8'h00;
    foreach (we[i]) begin we[i] = 1'b0; waddr[i] = 8'h00; wdata[i] = 8'h00; end
    foreach (model[i]) model[i] = 8'h00;
    repeat (2) @(posedge clk);
    #1;
    model[A_SP] = 8'h07;
    model[A_P0] = 8'hFF; model[A_P1] = 8'hFF; model[A_P2] = 8'hFF; model[A_P3] = 8'hFF;
    check("reset P0", p0, 8'hFF); check("reset P1", p1, 8'hFF);
    check("reset P2", p2, 8'hFF); check("reset P3", p3, 8'hFF);
    paddr = A_SP;  #1 check("reset SP", pdata, 8'h07);
    paddr = A_DPL; #1 check("reset DPL", pdata, 8'h00);
    paddr = A_DPH; #1 check("reset DPH", pdata, 8'h00);
    paddr = A_B;   #1 check("reset B", pdata, 8'h00);
    rst_n = 1'b1;

    // fill the RAM
    for (int a = 0; a < 128; a += 2) begin
      @(negedge clk);
      we[0] = 1'b1; waddr[0] = 8'(a);     wdata[0] = 8'($urandom);
      we[1] = 1'b1; waddr[1] = 8'(a + 1); wdata[1] = 8'($urandom);
      model[a] = wdata[0]; model[a + 1] = wdata[1];
    end
    @(negedge clk);
    we[0] = 1'b0; we[1] = 1'b0;

    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      paddr = rand_addr();
      foreach (raddr[i]) raddr[i] = rand_addr();
      #1;
      check($sformatf("pdata @%02h", paddr), pdata, expect_rd(paddr));
      foreach (raddr[i]) check($sformatf("rdata%0d @%02h", i, raddr[i]), rdata[i], expect_rd(raddr[i]));
      check("P0", p0, model[A_P0]); check("P1", p1, model[A_P1]);
      check("P2", p2, model[A_P2]); check("P3", p3, model[A_P3]);
      foreach (we[i]) begin
        we[i]    = $urandom_range(0, 1) == 1;
        waddr[i] = rand_addr();
        wdata[i] = 8'($urandom);
      end
      if ($urandom_range(0, 7) == 0) waddr[1] = waddr[0];
      for (int i = 0; i < 2; i++)
        if (we[i] && implemented(waddr[i])) model[waddr[i]] = wdata[i];
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
