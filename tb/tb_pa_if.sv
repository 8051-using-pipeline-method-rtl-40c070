// tb_pa_if: checks the fetch stage against a random program ROM.
//
// The ROM model answers one cycle after each address. A model of ID takes bytes
// with a random ready, and now and then redirects PC to a random target (near
// the current block, in the next block, or far away). Every byte handed over
// must be the ROM byte at the expected PC, which counts up from the last redirect
// target (compared on the 12 ROM address bits: the 4 KB ROM wraps). A second phase runs 1000 bytes straight through with ready held high and
// checks that prefetching of the next block keeps the output busy (at least 90 %
// of cycles deliver a byte). Buffer misses must have been seen.
module tb_pa_if;
  import pa8051_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        rom_rd;
  logic [11:0] rom_addr;
  logic [7:0]  rom_data;
  logic        out_valid, out_ready, redirect, miss;
  logic [7:0]  out_byte;
  logic [15:0] out_pc, redirect_pc;

  pa_if dut (.clk, .rst_n, .rom_rd, .rom_addr, .rom_data,
             .out_valid, .out_byte, .out_pc, .out_ready,
             .redirect, .redirect_pc, .miss);

  always #5 clk = ~clk;

  logic [7:0] rom [4096];
  always_ff @(posedge clk) rom_data <= rom[rom_addr];

  int checks = 0, failures = 0;
  int n_bytes = 0, n_redir = 0, n_miss = 0;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge clk) if (rst_n && miss && dut.start) n_miss++;

  initial begin
    logic [15:0] exp_pc;
    int got, cycles;
    foreach (rom[i]) rom[i] = 8'($urandom);
    rst_n = 1'b0;
    out_ready = 1'b0;
    redirect = 1'b0;
    redirect_pc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    exp_pc = 16'h0000;

    // phase 1: random ready and redirects
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      redirect  = 1'b0;
      out_ready = $urandom_range(0, 3) != 0;
      if ($urandom_range(0, 40) == 0) begin
        int k = $urandom_range(0, 2);
        redirect    = 1'b1;
        out_ready   = 1'b0;
        redirect_pc = (k == 0) ? 16'(exp_pc + $urandom_range(0, 40) - 20) & 16'h0FFF :
                      (k == 1) ? 16'(exp_pc + $urandom_range(20, 60)) & 16'h0FFF :
                                 16'($urandom_range(0, 4095));
      end
      #1;
      if (out_valid && out_ready) begin
        check($sformatf("pc %04h expected %04h", out_pc, exp_pc), out_pc[11:0] == exp_pc[11:0]);
        check($sformatf("byte at %04h", out_pc), out_byte == rom[out_pc[11:0]]);
        exp_pc = 16'(exp_pc + 1) & 16'h0FFF;
        n_bytes++;
      end
      if (redirect) begin
        exp_pc = redirect_pc;
        n_redir++;
      end
    end

    // phase 2: straight-line code
    @(negedge clk);
    out_ready   = 1'b0;
    redirect    = 1'b1;
    redirect_pc = 16'h0100;
    exp_pc      = 16'h0100;
    @(negedge clk);
    redirect  = 1'b0;
    out_ready = 1'b1;
    got = 0;
    cycles = 0;
    while (got < 1000) begin
      #1;
      if (out_valid) begin
        check("straight-line pc", out_pc[11:0] == exp_pc[11:0]);
        check("straight-line byte", out_byte == rom[out_pc[11:0]]);
        exp_pc = 16'(exp_pc + 1) & 16'h0FFF;
        got++;
      end
      cycles++;
      @(negedge clk);
    end
    $display("phase 1: %0d bytes, %0d redirects, %0d misses; phase 2: 1000 bytes in %0d cycles",
             n_bytes, n_redir, n_miss, cycles);
    check("bytes delivered", n_bytes > 5000);
    check("misses seen", n_miss > 10);
    check("prefetch keeps up", cycles * 9 <= 1000 * 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
