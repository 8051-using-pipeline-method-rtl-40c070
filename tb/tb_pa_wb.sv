// tb_pa_wb: checks the write-back decoding of every WriteCtrl value.
//
// For each write control, with random data, addresses (including the empty
// address FFh), flags and taken bits, the memory write request and the jump
// output are compared with a table of what each control does:
//   dest1 -> its own address:  ACC, ACC_MEM, DPTR, SP_MEM
//   dest2 -> resolved address: MEM, MEM_WB, MEMWB, ACC_MEM, SP_MEM, DPTR,
//                              JMP_MEM, JMP_MEMWB
//   jump when taken:           JMP, CJMP, JMP_MEM, JMP_MEMWB
//   no flag update for WR_NO (a dropped instruction).
module tb_pa_wb;
  import pa8051_pkg::*;

  logic        in_valid;
  exe2wb_t     in;
  logic        wb_valid, jmp;
  mem_write_t  mw;
  logic [15:0] jmp_addr;

  pa_wb dut (.in_valid, .in, .wb_valid, .mw, .jmp, .jmp_addr);

  int checks = 0, failures = 0;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (ctrl %s)", what, in.ctrl.name());
    end
  endtask

  initial begin : watchdog
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    write_ctrl_e c;
    bit w1, w2, j;
    in_valid = 1'b0;
    in = '0;
    for (int n = 0; n < 4000; n++) begin
      c = write_ctrl_e'($urandom_range(0, 12));
      in = '0;
      in.ctrl    = c;
      in.dest1   = 8'($urandom);
      in.dest2   = 8'($urandom);
      in.d1addr  = ($urandom_range(0, 5) == 0) ? NO_ADDR : 8'($urandom_range(0, 254));
      in.waddr   = ($urandom_range(0, 5) == 0) ? NO_ADDR : 8'($urandom_range(0, 254));
      in.taken   = 1'($urandom);
      in.jaddr   = 16'($urandom);
      in.flag_we = 3'($urandom);
      in.cy      = 1'($urandom);
      in.ac      = 1'($urandom);
      in.ov      = 1'($urandom);
      in_valid   = 1'($urandom);
      #1;
      w1 = c inside {WR_ACC, WR_ACC_MEM, WR_DPTR, WR_SP_MEM};
      w2 = c inside {WR_MEM, WR_MEM_WB, WR_MEMWB, WR_ACC_MEM, WR_SP_MEM, WR_DPTR,
                     WR_JMP_MEM, WR_JMP_MEMWB};
      j  = c inside {WR_JMP, WR_CJMP, WR_JMP_MEM, WR_JMP_MEMWB};
      check("wb_valid", wb_valid == in_valid);
      check("w1_en", mw.w1_en == (w1 && in.d1addr != NO_ADDR));
      check("w2_en", mw.w2_en == (w2 && in.waddr != NO_ADDR));
      if (mw.w1_en) check("w1 addr/data", mw.w1_addr == in.d1addr && mw.w1_data == in.dest1);
      if (mw.w2_en) check("w2 addr/data", mw.w2_addr == in.waddr && mw.w2_data == in.dest2);
      check("flag_we", mw.flag_we == ((c == WR_NO) ? 3'b000 : in.flag_we));
      if (mw.flag_we != 3'b000) check("flags", mw.cy == in.cy && mw.ac == in.ac && mw.ov == in.ov);
      check("jmp", jmp == (in_valid && j && in.taken));
      if (jmp) check("jmp_addr", jmp_addr == in.jaddr);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
