// tb_pa_exe: checks the execute stage against a reference model.
//
// Random instructions (all 44 operations, random operands, forward codes, write
// controls and bit numbers) enter EXE, mostly with the current colour and now
// and then with the other one. The reference model written here keeps its own
// copy of the colour, of CY/AC/OV and of the last dest1/dest2, and computes the
// expected result record: dest1, dest2, flags and flag enables, taken bit and
// target, addresses. Dropped (wrong-colour) instructions must come out as empty
// WR_NO records and must not change any state. Directed cases cover DA after
// BCD additions, DIV by zero and the carry chain of a 16-bit addition.
module tb_pa_exe;
  import pa8051_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    in_valid, out_valid, flush;
  of2exe_t in;
  exe2wb_t out;

  pa_exe dut (.clk, .rst_n, .in_valid, .in, .out_valid, .out, .flush);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_taken = 0, n_flushed = 0;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (op %s)", what, in.opcode.name());
    end
  endtask

  // reference state
  logic       m_col, m_cy, m_ac, m_ov;
  logic [7:0] m_d1, m_d2;

  function automatic exe2wb_t model(input of2exe_t i);
    exe2wb_t r;
    logic [7:0] a, b, t;
    logic [8:0] s;
    logic [4:0] h;
    logic [15:0] p;
    logic c, bv, ci;
    logic [7:0] m;
    a = (i.fwd.s1 == FW_D1) ? m_d1 : (i.fwd.s1 == FW_D2) ? m_d2 : i.src1;
    b = (i.fwd.s2 == FW_D1) ? m_d1 : (i.fwd.s2 == FW_D2) ? m_d2 : i.src2;
    r = '0;
    r.ctrl = i.wr.ctrl; r.d1addr = i.d1addr; r.waddr = i.src3; r.jaddr = i.wr.jaddr;
    r.dest1 = a; r.dest2 = b; r.cy = m_cy; r.ac = m_ac; r.ov = m_ov;
    m  = 8'h01 << i.bitidx;
    bv = a[i.bitidx];
    case (i.opcode)
      OP_MUL: begin p = a * b; r.dest1 = p[7:0]; r.dest2 = p[15:8]; r.cy = 0; r.ov = p[15:8] != 0; r.flag_we = 3'b101; end
      OP_DIV: begin
        r.cy = 0; r.ov = b == 0; r.flag_we = 3'b101;
        if (b != 0) begin r.dest1 = a / b; r.dest2 = a % b; end
      end
      OP_NOP: if (i.wr.ctrl == WR_JMP) begin r.taken = 1; r.jaddr = {i.src3, b} + 16'(a); end
      OP_ADD, OP_ADDC: begin
        ci = (i.opcode == OP_ADDC) && m_cy;
        s = 9'(a) + 9'(b) + 9'(ci); h = 5'(a[3:0]) + 5'(b[3:0]) + 5'(ci);
        r.dest1 = s[7:0]; r.dest2 = s[7:0]; r.cy = s[8]; r.ac = h[4];
        r.ov = (a[7] & b[7] & ~s[7]) | (~a[7] & ~b[7] & s[7]); r.flag_we = 3'b111;
      end
      OP_SUB: begin
        s = 9'(a) - 9'(b) - 9'(m_cy); h = 5'(a[3:0]) - 5'(b[3:0]) - 5'(m_cy);
        r.dest1 = s[7:0]; r.dest2 = s[7:0]; r.cy = s[8]; r.ac = h[4];
        r.ov = (a[7] & ~b[7] & ~s[7]) | (~a[7] & b[7] & s[7]); r.flag_we = 3'b111;
      end
      OP_NOT: begin r.dest1 = ~a; r.dest2 = ~a; end
      OP_AND: begin r.dest1 = a & b; r.dest2 = a & b; end
      OP_XOR: begin r.dest1 = a ^ b; r.dest2 = a ^ b; end
      OP_OR:  begin r.dest1 = a | b; r.dest2 = a | b; end
      OP_RL:  r.dest1 = {a[6:0], a[7]};
      OP_RR:  r.dest1 = {a[0], a[7:1]};
      OP_RLC: begin r.dest1 = {a[6:0], m_cy}; r.cy = a[7]; r.flag_we = 3'b100; end
      OP_RRC: begin r.dest1 = {m_cy, a[7:1]}; r.cy = a[0]; r.flag_we = 3'b100; end
      OP_SWAP: r.dest1 = {a[3:0], a[7:4]};
      OP_XCH:  begin r.dest1 = b; r.dest2 = a; end
      OP_XCHD: begin r.dest1 = {a[7:4], b[3:0]}; r.dest2 = {b[7:4], a[3:0]}; end
      OP_INC, OP_DEC: begin
        t = (i.opcode == OP_INC) ? a + 1 : a - 1;
        r.dest1 = t; r.dest2 = (i.wr.ctrl == WR_SP_MEM) ? b : t;
      end
      OP_DA: begin
        // decimal adjust: add 6 and/or 60h, carry is sticky
        int v = a;
        c = m_cy;
        if (a[3:0] > 9 || m_ac) v += 6;
        if (v > 255) c = 1;
        if (v[7:4] > 9 || c) v = (v & 255) + 8'h60;
        if (v > 255) c = 1;
        r.dest1 = 8'(v); r.cy = c; r.flag_we = 3'b100;
      end
      OP_DJNZ: begin t = a - 1; r.dest1 = t; r.dest2 = t; r.taken = t != 0; end
      OP_CJNE: begin r.taken = a != b; r.cy = a < b; r.flag_we = 3'b100; end
      OP_CMPZ:  r.taken = a == 0;
      OP_CMPNZ: r.taken = a != 0;
      OP_INC16: {r.dest2, r.dest1} = {b, a} + 16'd1;
      OP_BCMPZ:  r.taken = bv;
      OP_BCMPNZ: r.taken = !bv;
      OP_BCMPNZC: begin r.taken = bv; r.dest2 = a & ~m; end
      OP_CLRA: begin r.dest1 = 0; r.dest2 = 0; end
      OP_JC:  r.taken = m_cy;
      OP_JNC: r.taken = !m_cy;
      OP_CPLB: r.dest2 = a ^ m;
      OP_CLRB: r.dest2 = a & ~m;
      OP_SETB: r.dest2 = a | m;
      OP_MOVB: r.dest2 = m_cy ? a | m : a & ~m;
      OP_CPLC:  begin r.cy = !m_cy; r.flag_we = 3'b100; end
      OP_CLRC:  begin r.cy = 0; r.flag_we = 3'b100; end
      OP_SETC:  begin r.cy = 1; r.flag_we = 3'b100; end
      OP_ORC:   begin r.cy = m_cy | bv; r.flag_we = 3'b100; end
      OP_ANLC:  begin r.cy = m_cy & bv; r.flag_we = 3'b100; end
      OP_ORLNC: begin r.cy = m_cy | !bv; r.flag_we = 3'b100; end
      OP_ANLNC: begin r.cy = m_cy & !bv; r.flag_we = 3'b100; end
      OP_MOVC:  begin r.cy = bv; r.flag_we = 3'b100; end
      default: ;
    endcase
    if (!(i.wr.ctrl inside {WR_JMP, WR_CJMP, WR_JMP_MEM, WR_JMP_MEMWB})) r.taken = 0;
    return r;
  endfunction

  // advance the reference state after a live instruction
  task automatic update(input exe2wb_t r);
    logic [7:0] p;
    bit pw;
    m_d1 = r.dest1;
    m_d2 = r.dest2;
    if (r.taken) m_col = ~m_col;
    pw = 0;
    p = 8'h00;
    if (r.d1addr == A_PSW) begin p = r.dest1; pw = 1; end
    if (r.ctrl inside {WR_MEM, WR_MEM_WB, WR_MEMWB, WR_SP_MEM, WR_ACC_MEM, WR_DPTR,
                       WR_JMP_MEM, WR_JMP_MEMWB} && r.waddr == A_PSW) begin p = r.dest2; pw = 1; end
    m_cy = r.flag_we[2] ? r.cy : pw ? p[7] : m_cy;
    m_ac = r.flag_we[1] ? r.ac : pw ? p[6] : m_ac;
    m_ov = r.flag_we[0] ? r.ov : pw ? p[2] : m_ov;
  endtask

  function automatic of2exe_t rand_instr();
    of2exe_t i;
    logic [7:0] addrs [5] = '{A_ACC, NO_ADDR, 8'h30, A_B, A_PSW};
    i = '0;
    i.opcode = exe_op_e'($urandom_range(0, 43));
    i.wr.ctrl = write_ctrl_e'($urandom_range(0, 12));
    i.wr.jaddr = 16'($urandom);
    i.src1 = 8'($urandom);
    i.src2 = 8'($urandom);
    i.src3 = addrs[$urandom_range(0, 4)];
    i.d1addr = addrs[$urandom_range(0, 4)];
    i.bitidx = 3'($urandom);
    i.fwd = '{s1: fwd_sel_e'($urandom_range(0, 2)), s2: fwd_sel_e'($urandom_range(0, 2))};
    i.color = m_col ^ ($urandom_range(0, 7) == 0);
    return i;
  endfunction

  task automatic step(input of2exe_t i, input logic v);
    exe2wb_t e;
    bit live;
    @(negedge clk);
    in = i;
    in_valid = v;
    #1;
    live = v && i.color == m_col;
    check("flush", flush == (v && !live));
    e = model(i);
    @(posedge clk);
    #1;
    check("out_valid", out_valid == v);
    if (live) begin
      check("dest1", out.dest1 == e.dest1);
      check("dest2", out.dest2 == e.dest2);
      check("addresses/ctrl", out.ctrl == e.ctrl && out.d1addr == e.d1addr && out.waddr == e.waddr);
      check("flag enables", out.flag_we == e.flag_we);
      check("cy", !e.flag_we[2] || out.cy == e.cy);
      check("ac", !e.flag_we[1] || out.ac == e.ac);
      check("ov", !e.flag_we[0] || out.ov == e.ov);
      check("taken", out.taken == e.taken);
      if (e.taken) check("target", out.jaddr == e.jaddr);
      if (e.taken) n_taken++;
      update(e);
    end else if (v) begin
      check("dropped", out.ctrl == WR_NO && out.d1addr == NO_ADDR && out.waddr == NO_ADDR &&
            out.flag_we == 3'b000 && !out.taken);
      n_flushed++;
    end
  endtask

  function automatic of2exe_t mk(input exe_op_e op, input logic [7:0] a, input logic [7:0] b);
    of2exe_t i;
    i = '0;
    i.opcode = op; i.wr.ctrl = WR_ACC; i.src1 = a; i.src2 = b;
    i.src3 = NO_ADDR; i.d1addr = A_ACC; i.color = m_col;
    i.fwd = '{s1: FW_NO, s2: FW_NO};
    return i;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0; in = '0;
    m_col = 0; m_cy = 0; m_ac = 0; m_ov = 0; m_d1 = 0; m_d2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // directed: BCD 38 + 49 = 87, 99 + 01 = 100
    step(mk(OP_ADD, 8'h38, 8'h49), 1);
    step(mk(OP_DA, 8'h81, 8'h00), 1);
    check("DA 38+49", out.dest1 == 8'h87 && out.cy == 1'b0);
    step(mk(OP_ADD, 8'h99, 8'h01), 1);
    step(mk(OP_DA, 8'h9A, 8'h00), 1);
    check("DA 99+01", out.dest1 == 8'h00 && out.cy == 1'b1);
    // DIV by zero sets OV
    step(mk(OP_DIV, 8'h12, 8'h00), 1);
    check("DIV by 0", out.ov == 1'b1 && out.cy == 1'b0);
    // 16-bit add 12F0h + 0125h = 1415h through the carry
    step(mk(OP_ADD, 8'hF0, 8'h25), 1);
    check("low byte", out.dest1 == 8'h15 && out.cy == 1'b1);
    step(mk(OP_ADDC, 8'h12, 8'h01), 1);
    check("high byte", out.dest1 == 8'h14 && out.cy == 1'b0);

    for (int n = 0; n < 20000; n++) step(rand_instr(), $urandom_range(0, 5) != 0);
    $display("taken %0d, dropped %0d", n_taken, n_flushed);
    check("jumps and drops seen", n_taken > 100 && n_flushed > 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
