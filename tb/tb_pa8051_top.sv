// tb_pa8051_top: end-to-end test of the pipelined 8051 core.
//
// The testbench holds the 4 KB program ROM (one-cycle read latency) and runs two
// kinds of program:
//
//  * A hazard program whose every step was worked out by hand. It exercises the
//    forwarding of ACC and memory results, the stalls on a pending @Ri pointer
//    (type 2) and on pending bank-select bits (type 3), a DJNZ loop whose taken
//    branches flush the instructions behind them, MUL/DIV, DPTR moves, PUSH/POP,
//    LCALL/RET, table reads with MOVC A,@A+DPTR and MOVC A,@A+PC, a taken JC
//    and, behind it, a dependent chain run under the
//    flipped colour bit. The final RAM, SP and port contents are compared
//    with the expected values.
//  * Euclid's GCD by repeated subtraction, the benchmark used for the design, for
//    fixed and random operand pairs; the result on P1 is compared with a GCD
//    computed here.
//
// Each program ends by writing 55h to P2. Counters record how often each
// mechanism fired (forward, each stall type, flush, taken jump, jump in ID,
// buffer miss, call/return in ID, MOVC, ID read grant); a mechanism that never fired is
// a failure. The core runs with its default parameters.
module tb_pa8051_top;
  import pa8051_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        rom_rd;
  logic [11:0] rom_addr;
  logic [7:0]  rom_data;
  logic        code_rd;
  logic [11:0] code_addr;
  logic [7:0]  code_data;
  logic [7:0]  p0, p1, p2, p3;

  pa8051_top dut (
    .clk, .rst_n, .rom_rd, .rom_addr, .rom_data, .code_rd, .code_addr, .code_data,
    .p0_out(p0), .p1_out(p1), .p2_out(p2), .p3_out(p3)
  );

  always #5 clk = ~clk;

  logic [7:0] rom [4096];
  always_ff @(posedge clk) rom_data  <= rom[rom_addr];
  always_ff @(posedge clk) code_data <= rom[code_addr];

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  // mechanism counters
  int n_fwd = 0, n_stall2 = 0, n_stall3 = 0, n_stall = 0, n_flush = 0, n_jmp = 0;
  int n_idjmp = 0, n_miss = 0, n_call = 0, n_ret = 0, n_idgnt = 0, n_retired = 0;
  int n_movc = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_mi.rsp_valid && !dut.u_mi.mismatch &&
        (dut.u_mi.fwd.s1 != FW_NO || dut.u_mi.fwd.s2 != FW_NO)) n_fwd++;
    if (dut.u_mi.req_valid && !dut.u_mi.rsp_valid) n_stall++;
    if (dut.u_mi.req_valid && !dut.u_mi.rsp_valid && dut.u_mi.need_ri &&
        (dut.u_mi.hit_any(dut.u_mi.rd1, dut.u_mi.ptr_addr) ||
         dut.u_mi.hit_any(dut.u_mi.rd2, dut.u_mi.ptr_addr))) n_stall2++;
    if (dut.u_mi.req_valid && !dut.u_mi.rsp_valid && dut.u_mi.psw_locked &&
        dut.u_mi.req.s1.kind inside {K_REG, K_REGI}) n_stall3++;
    if (dut.u_exe.flush) n_flush++;
    if (dut.jmp) n_jmp++;
    if (dut.redirect && !dut.jmp && dut.u_id.complete) n_idjmp++;
    if (dut.u_if.start && dut.u_if.miss) n_miss++;
    if (dut.u_id.complete && dut.u_id.dec.kind == dut.u_id.K_CALL) n_call++;
    if (dut.u_id.complete && dut.u_id.dec.kind == dut.u_id.K_RET) n_ret++;
    if (dut.id_mr_gnt) n_idgnt++;
    if (dut.code_rd) n_movc++;
    if (dut.wb_valid) n_retired++;
  end

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  task automatic clear_rom();
    foreach (rom[i]) rom[i] = 8'h00;
  endtask

  task automatic put(input int addr, input logic [7:0] b[]);
    foreach (b[i]) rom[addr + i] = b[i];
  endtask

  // reset, then run until P2 = 55h; returns the cycle count
  task automatic run(input int limit, output int cyc, output bit done);
    int start;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    start = cycle;
    done  = 1'b0;
    while (cycle - start < limit) begin
      @(posedge clk);
      if (p2 == 8'h55) begin
        done = 1'b1;
        break;
      end
    end
    // let the last writes retire
    repeat (4) @(posedge clk);
    cyc = cycle - start;
  endtask

  function automatic int gcd(input int a, input int b);
    while (a != b) begin
      if (a > b) a -= b;
      else       b -= a;
    end
    return a;
  endfunction

  task automatic load_gcd(input logic [7:0] a, input logic [7:0] b);
    clear_rom();
    put(16'h0000, '{8'h75, 8'h30, a});           // MOV 30h,#a
    put(16'h0003, '{8'h75, 8'h31, b});           // MOV 31h,#b
    put(16'h0006, '{8'hE5, 8'h30});              // loop: MOV A,30h
    put(16'h0008, '{8'hB5, 8'h31, 8'h02});       // CJNE A,31h,ne
    put(16'h000B, '{8'h80, 8'h12});              // SJMP done
    put(16'h000D, '{8'h40, 8'h07});              // ne: JC less
    put(16'h000F, '{8'hC3});                     // CLR C
    put(16'h0010, '{8'h95, 8'h31});              // SUBB A,31h
    put(16'h0012, '{8'hF5, 8'h30});              // MOV 30h,A
    put(16'h0014, '{8'h80, 8'hF0});              // SJMP loop
    put(16'h0016, '{8'hE5, 8'h31});              // less: MOV A,31h
    put(16'h0018, '{8'hC3});                     // CLR C
    put(16'h0019, '{8'h95, 8'h30});              // SUBB A,30h
    put(16'h001B, '{8'hF5, 8'h31});              // MOV 31h,A
    put(16'h001D, '{8'h80, 8'hE7});              // SJMP loop
    put(16'h001F, '{8'hF5, 8'h90});              // done: MOV P1,A
    put(16'h0021, '{8'h75, 8'hA0, 8'h55});       // MOV P2,#55h
    put(16'h0024, '{8'h80, 8'hFE});              // SJMP $
  endtask

  task automatic load_hazard();
    clear_rom();
    put(16'h0000, '{8'h75, 8'hD0, 8'h00});       // MOV PSW,#0
    put(16'h0003, '{8'h78, 8'h40});              // MOV R0,#40h
    put(16'h0005, '{8'h76, 8'hAA});              // MOV @R0,#0AAh   (type 2 stall)
    put(16'h0007, '{8'h74, 8'h10});              // MOV A,#10h
    put(16'h0009, '{8'h24, 8'h05});              // ADD A,#05h      (ACC forwarded)
    put(16'h000B, '{8'h28});                     // ADD A,R0        A = 55h
    put(16'h000C, '{8'h08});                     // INC R0          R0 = 41h
    put(16'h000D, '{8'hF6});                     // MOV @R0,A       (type 2 stall)
    put(16'h000E, '{8'hE6});                     // MOV A,@R0       (dest2 forwarded)
    put(16'h000F, '{8'hD2, 8'hD3});              // SETB RS0
    put(16'h0011, '{8'h78, 8'h07});              // MOV R0,#07h     bank 1 (type 3 stall)
    put(16'h0013, '{8'hC2, 8'hD3});              // CLR RS0
    put(16'h0015, '{8'hE8});                     // MOV A,R0        A = 41h (type 3 stall)
    put(16'h0016, '{8'hF5, 8'h42});              // MOV 42h,A
    put(16'h0018, '{8'h85, 8'h08, 8'h43});       // MOV 43h,08h     = 07h
    put(16'h001B, '{8'h7A, 8'h03});              // MOV R2,#3
    put(16'h001D, '{8'hE4});                     // CLR A
    put(16'h001E, '{8'h24, 8'h02});              // loop: ADD A,#2
    put(16'h0020, '{8'hDA, 8'hFC});              // DJNZ R2,loop
    put(16'h0022, '{8'hF5, 8'h44});              // MOV 44h,A       = 06h
    put(16'h0024, '{8'h75, 8'hF0, 8'h07});       // MOV B,#7
    put(16'h0027, '{8'hA4});                     // MUL AB          A = 2Ah, B = 0
    put(16'h0028, '{8'hF5, 8'h45});              // MOV 45h,A
    put(16'h002A, '{8'h75, 8'hF0, 8'h05});       // MOV B,#5
    put(16'h002D, '{8'h84});                     // DIV AB          A = 08h, B = 02h
    put(16'h002E, '{8'h85, 8'hF0, 8'h46});       // MOV 46h,B
    put(16'h0031, '{8'hF5, 8'h47});              // MOV 47h,A
    put(16'h0033, '{8'h90, 8'h12, 8'h34});       // MOV DPTR,#1234h
    put(16'h0036, '{8'hA3});                     // INC DPTR
    put(16'h0037, '{8'h85, 8'h82, 8'h48});       // MOV 48h,DPL     = 35h
    put(16'h003A, '{8'h85, 8'h83, 8'h49});       // MOV 49h,DPH     = 12h
    put(16'h003D, '{8'hC0, 8'h48});              // PUSH 48h
    put(16'h003F, '{8'hD0, 8'h4A});              // POP 4Ah         = 35h
    put(16'h0041, '{8'h12, 8'h00, 8'h60});       // LCALL sub
    put(16'h0044, '{8'h75, 8'h4C, 8'h99});       // MOV 4Ch,#99h
    put(16'h0047, '{8'hD3});                     // SETB C
    put(16'h0048, '{8'h40, 8'h03});              // JC +3
    put(16'h004A, '{8'h75, 8'h4D, 8'h11});       // MOV 4Dh,#11h    (skipped)
    // after an odd number of taken jumps: a dependent chain under the other colour
    put(16'h004D, '{8'h74, 8'h03});              // MOV A,#3
    put(16'h004F, '{8'h24, 8'h04});              // ADD A,#4        A = 07h
    put(16'h0051, '{8'hF5, 8'h4E});              // MOV 4Eh,A
    put(16'h0053, '{8'h05, 8'h4E});              // INC 4Eh         = 08h
    put(16'h0055, '{8'hE5, 8'h4E});              // MOV A,4Eh
    put(16'h0057, '{8'hF5, 8'h90});              // MOV P1,A        = 08h
    put(16'h0059, '{8'h75, 8'hA0, 8'h55});       // MOV P2,#55h
    put(16'h005C, '{8'h80, 8'hFE});              // SJMP $
    put(16'h0060, '{8'h75, 8'h4B, 8'h77});       // sub: MOV 4Bh,#77h
    put(16'h0063, '{8'h75, 8'h4D, 8'h00});       // MOV 4Dh,#00h
    put(16'h0066, '{8'h90, 8'h00, 8'h80});       // MOV DPTR,#0080h
    put(16'h0069, '{8'h74, 8'h03});              // MOV A,#3
    put(16'h006B, '{8'h93});                     // MOVC A,@A+DPTR  A = [0083] = 3Ch
    put(16'h006C, '{8'hF5, 8'h4F});              // MOV 4Fh,A
    put(16'h006E, '{8'h74, 8'h04});              // MOV A,#4
    put(16'h0070, '{8'h83});                     // MOVC A,@A+PC    A = [0075] = C5h
    put(16'h0071, '{8'hF5, 8'h50});              // MOV 50h,A
    put(16'h0073, '{8'h22});                     // RET
    put(16'h0074, '{8'hAB, 8'hC5});              // table for MOVC A,@A+PC
    put(16'h0080, '{8'h10, 8'h20, 8'h30, 8'h3C}); // table for MOVC A,@A+DPTR
  endtask

  function automatic logic [7:0] ram(input int a);
    return dut.u_mem.ram[a];
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    bit done;
    rst_n = 1'b0;

    // ---------------- hazard program
    load_hazard();
    run(5000, cyc, done);
    checks++;
    if (!done) begin failures++; $display("FAIL hazard program did not finish"); end
    $display("hazard program: %0d cycles", cyc);
    check("[40]", ram(8'h40), 8'hAA);
    check("[41]", ram(8'h41), 8'h55);
    check("[42]", ram(8'h42), 8'h41);
    check("[43]", ram(8'h43), 8'h07);
    check("[44]", ram(8'h44), 8'h06);
    check("[45]", ram(8'h45), 8'h2A);
    check("[46]", ram(8'h46), 8'h02);
    check("[47]", ram(8'h47), 8'h08);
    check("[48]", ram(8'h48), 8'h35);
    check("[49]", ram(8'h49), 8'h12);
    check("[4A]", ram(8'h4A), 8'h35);
    check("[4B]", ram(8'h4B), 8'h77);
    check("[4C]", ram(8'h4C), 8'h99);
    check("[4D]", ram(8'h4D), 8'h00);
    check("[4E]", ram(8'h4E), 8'h08);
    check("[4F] MOVC @A+DPTR", ram(8'h4F), 8'h3C);
    check("[50] MOVC @A+PC", ram(8'h50), 8'hC5);
    check("[08] return PCL", ram(8'h08), 8'h44);
    check("[09] return PCH", ram(8'h09), 8'h00);
    check("R0", ram(8'h00), 8'h41);
    check("R2", ram(8'h02), 8'h00);
    check("SP", dut.u_mem.sp, 8'h07);
    check("B", dut.u_mem.b_reg, 8'h02);
    check("P1", p1, 8'h08);

    // ---------------- GCD
    begin
      int pairs [][2] = '{'{48, 18}, '{35, 14}, '{17, 5}, '{100, 75}, '{255, 3}, '{1, 1}};
      int total_cyc = 0, total_instr = 0;
      for (int k = 0; k < 16; k++) begin
        int a, b, retired0;
        if (k < pairs.size()) begin
          a = pairs[k][0];
          b = pairs[k][1];
        end else begin
          a = 1 + int'($urandom_range(0, 119));
          b = 1 + int'($urandom_range(0, 119));
        end
        load_gcd(8'(a), 8'(b));
        retired0 = n_retired;
        run(20000, cyc, done);
        checks++;
        if (!done) begin failures++; $display("FAIL gcd(%0d,%0d) did not finish", a, b); end
        check($sformatf("gcd(%0d,%0d)", a, b), p1, 8'(gcd(a, b)));
        total_cyc   += cyc;
        total_instr += n_retired - retired0;
      end
      $display("GCD: %0d cycles, %0d instructions through WB", total_cyc, total_instr);
    end

    // ---------------- mechanisms
    $display("forward=%0d stall=%0d (type2=%0d type3=%0d) flush=%0d jmp=%0d id_jump=%0d miss=%0d call=%0d ret=%0d movc=%0d id_read=%0d",
             n_fwd, n_stall, n_stall2, n_stall3, n_flush, n_jmp, n_idjmp, n_miss, n_call, n_ret,
             n_movc, n_idgnt);
    checks++; if (n_fwd    == 0) begin failures++; $display("FAIL no forward");      end
    checks++; if (n_stall2 == 0) begin failures++; $display("FAIL no type 2 stall"); end
    checks++; if (n_stall3 == 0) begin failures++; $display("FAIL no type 3 stall"); end
    checks++; if (n_flush  == 0) begin failures++; $display("FAIL no flush");        end
    checks++; if (n_jmp    == 0) begin failures++; $display("FAIL no taken jump");   end
    checks++; if (n_idjmp  == 0) begin failures++; $display("FAIL no jump in ID");   end
    checks++; if (n_miss   == 0) begin failures++; $display("FAIL no buffer miss");  end
    checks++; if (n_call   == 0) begin failures++; $display("FAIL no call");         end
    checks++; if (n_ret    == 0) begin failures++; $display("FAIL no return");       end
    checks++; if (n_idgnt  == 0) begin failures++; $display("FAIL no ID read");      end
    checks++; if (n_movc   == 0) begin failures++; $display("FAIL no MOVC");         end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
