// pa_exe: execution (EXE) stage of the pipelined 8051.
//
// Holds the ALU, the 8x8 multiplier and the 8/8 divider, a local copy of the
// PSW flags (CY, AC, OV) and the colour register. Per instruction it:
//
//  1. compares the instruction's colour bit with the colour register; on a
//     mismatch the instruction was fetched down a path abandoned by a taken jump
//     and is turned into a NOP (it still travels to WB so that its lock retires);
//  2. applies the forward code: src1/src2 are replaced by dest1/dest2 of the
//     previous executed instruction, which are still held in this stage;
//  3. computes dest1/dest2, the new flags and, for jumps, whether the jump is
//     taken. A taken jump flips the colour register, so everything behind it with
//     the old colour is dropped.
//
// The flags are read from the local copy, so a carry chain (ADD then ADDC, CLR C
// then SUBB) runs without waiting for write-back; the copy follows every flag
// update and every write of the whole PSW byte.
//
// Interface: valid input from OF, registered valid output (the "out" record) to
// WB. One instruction per cycle; the stage never stalls.
//
// The units, the PSW copy, the colour bit and the forward mechanism follow the
// design; the single-cycle multiplier and divider are this implementation's choice.
module pa_exe
  import pa8051_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  of2exe_t in,
  output logic    out_valid,
  output exe2wb_t out,
  // status
  output logic    flush       // an instruction was dropped this cycle
);

  logic       color;
  logic       cy, ac, ov;
  logic [7:0] dest1_q, dest2_q;

  logic [7:0] s1, s2;
  always_comb begin
    unique case (in.fwd.s1)
      FW_D1:   s1 = dest1_q;
      FW_D2:   s1 = dest2_q;
      default: s1 = in.src1;
    endcase
    unique case (in.fwd.s2)
      FW_D1:   s2 = dest1_q;
      FW_D2:   s2 = dest2_q;
      default: s2 = in.src2;
    endcase
  end

  exe2wb_t r;
  logic    bitv;
  logic [7:0] bmask;
  always_comb begin
    logic [8:0]  sum;
    logic [4:0]  hsum;
    logic        cin;
    logic [15:0] prod;
    logic [7:0]  t;
    logic        c;
    r         = '0;
    r.ctrl    = in.wr.ctrl;
    r.d1addr  = in.d1addr;
    r.waddr   = in.src3;
    r.jaddr   = in.wr.jaddr;
    r.dest1   = s1;
    r.dest2   = s2;
    r.cy      = cy;
    r.ac      = ac;
    r.ov      = ov;
    bmask     = 8'(1) << in.bitidx;
    bitv      = s1[in.bitidx];
    sum       = '0;
    hsum      = '0;
    prod      = '0;
    t         = '0;
    c         = 1'b0;
    cin       = (in.opcode == OP_ADD) ? 1'b0 : cy;
    unique case (in.opcode)
      OP_MUL: begin
        prod    = s1 * s2;
        r.dest1 = prod[7:0];
        r.dest2 = prod[15:8];
        r.cy = 1'b0; r.ov = prod[15:8] != 8'h00; r.flag_we = 3'b101;
      end
      OP_DIV: begin
        r.cy = 1'b0; r.ov = s2 == 8'h00; r.flag_we = 3'b101;
        if (s2 != 8'h00) begin
          r.dest1 = s1 / s2;
          r.dest2 = s1 % s2;
        end
      end
      OP_NOP: begin
        if (in.wr.ctrl == WR_JMP) begin   // JMP @A+DPTR
          r.taken = 1'b1;
          r.jaddr = {in.src3, s2} + {8'h00, s1};
        end
      end
      OP_MOV: ;
      OP_ADD, OP_ADDC: begin
        sum  = {1'b0, s1} + {1'b0, s2} + {8'h00, cin};
        hsum = {1'b0, s1[3:0]} + {1'b0, s2[3:0]} + {4'h0, cin};
        r.dest1 = sum[7:0]; r.dest2 = sum[7:0];
        r.cy = sum[8]; r.ac = hsum[4];
        r.ov = (s1[7] == s2[7]) && (sum[7] != s1[7]);
        r.flag_we = 3'b111;
      end
      OP_SUB: begin
        sum  = {1'b0, s1} - {1'b0, s2} - {8'h00, cy};
        hsum = {1'b0, s1[3:0]} - {1'b0, s2[3:0]} - {4'h0, cy};
        r.dest1 = sum[7:0]; r.dest2 = sum[7:0];
        r.cy = sum[8]; r.ac = hsum[4];
        r.ov = (s1[7] != s2[7]) && (sum[7] != s1[7]);
        r.flag_we = 3'b111;
      end
      OP_NOT:  begin r.dest1 = ~s1;     r.dest2 = ~s1;     end
      OP_AND:  begin r.dest1 = s1 & s2; r.dest2 = s1 & s2; end
      OP_XOR:  begin r.dest1 = s1 ^ s2; r.dest2 = s1 ^ s2; end
      OP_OR:   begin r.dest1 = s1 | s2; r.dest2 = s1 | s2; end
      OP_RL:   begin r.dest1 = {s1[6:0], s1[7]}; end
      OP_RR:   begin r.dest1 = {s1[0], s1[7:1]}; end
      OP_RLC:  begin r.dest1 = {s1[6:0], cy}; r.cy = s1[7]; r.flag_we = 3'b100; end
      OP_RRC:  begin r.dest1 = {cy, s1[7:1]}; r.cy = s1[0]; r.flag_we = 3'b100; end
      OP_SWAP: begin r.dest1 = {s1[3:0], s1[7:4]}; end
      OP_XCH:  begin r.dest1 = s2; r.dest2 = s1; end
      OP_XCHD: begin r.dest1 = {s1[7:4], s2[3:0]}; r.dest2 = {s2[7:4], s1[3:0]}; end
      OP_INC, OP_DEC: begin
        t = (in.opcode == OP_INC) ? s1 + 8'd1 : s1 - 8'd1;
        r.dest1 = t;
        // PUSH/POP: dest1 is the new SP, dest2 the byte moved
        r.dest2 = (in.wr.ctrl == WR_SP_MEM) ? s2 : t;
      end
      OP_DA: begin
        t = s1;
        c = cy;
        if (t[3:0] > 4'd9 || ac) begin
          sum = {1'b0, t} + 9'h006;
          t   = sum[7:0];
          c   = c | sum[8];
        end
        if (t[7:4] > 4'd9 || c) begin
          sum = {1'b0, t} + 9'h060;
          t   = sum[7:0];
          c   = c | sum[8];
        end
        r.dest1 = t; r.cy = c; r.flag_we = 3'b100;
      end
      OP_DJNZ: begin
        t = s1 - 8'd1;
        r.dest1 = t; r.dest2 = t;
        r.taken = t != 8'h00;
      end
      OP_CJNE: begin
        r.taken = s1 != s2;
        r.cy = s1 < s2; r.flag_we = 3'b100;
      end
      OP_CMPZ:  r.taken = s1 == 8'h00;
      OP_CMPNZ: r.taken = s1 != 8'h00;
      OP_INC16: {r.dest2, r.dest1} = {s2, s1} + 16'd1;
      OP_BCMPZ:  r.taken = bitv;
      OP_BCMPNZ: r.taken = !bitv;
      OP_BCMPNZC: begin r.taken = bitv; r.dest2 = s1 & ~bmask; end
      OP_CLRA:  begin r.dest1 = 8'h00; r.dest2 = 8'h00; end
      OP_JC:    r.taken = cy;
      OP_JNC:   r.taken = !cy;
      OP_CPLB:  r.dest2 = s1 ^ bmask;
      OP_CLRB:  r.dest2 = s1 & ~bmask;
      OP_SETB:  r.dest2 = s1 | bmask;
      OP_MOVB:  r.dest2 = cy ? (s1 | bmask) : (s1 & ~bmask);
      OP_CPLC:  begin r.cy = !cy;          r.flag_we = 3'b100; end
      OP_CLRC:  begin r.cy = 1'b0;         r.flag_we = 3'b100; end
      OP_SETC:  begin r.cy = 1'b1;         r.flag_we = 3'b100; end
      OP_ORC:   begin r.cy = cy | bitv;    r.flag_we = 3'b100; end
      OP_ANLC:  begin r.cy = cy & bitv;    r.flag_we = 3'b100; end
      OP_ORLNC: begin r.cy = cy | !bitv;   r.flag_we = 3'b100; end
      OP_ANLNC: begin r.cy = cy & !bitv;   r.flag_we = 3'b100; end
      OP_MOVC:  begin r.cy = bitv;         r.flag_we = 3'b100; end
      default: ;
    endcase
    if (!(in.wr.ctrl inside {WR_JMP, WR_CJMP, WR_JMP_MEM, WR_JMP_MEMWB})) r.taken = 1'b0;
  end

  function automatic logic mem_write(input write_ctrl_e c);
    return c inside {WR_MEM, WR_MEM_WB, WR_MEMWB, WR_SP_MEM, WR_ACC_MEM, WR_DPTR,
                     WR_JMP_MEM, WR_JMP_MEMWB};
  endfunction

  logic live;
  assign live  = in_valid && in.color == color;
  assign flush = in_valid && !live;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      color     <= 1'b0;
      cy        <= 1'b0;
      ac        <= 1'b0;
      ov        <= 1'b0;
      dest1_q   <= 8'h00;
      dest2_q   <= 8'h00;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= in_valid;
      if (live) begin
        logic [7:0] p;
        logic       pw;
        out     <= r;
        dest1_q <= r.dest1;
        dest2_q <= r.dest2;
        if (r.taken) color <= ~color;
        // keep the flag copy in step with PSW
        pw = 1'b0;
        p  = {cy, ac, 3'b000, ov, 2'b00};
        if (r.d1addr == A_PSW) begin p = r.dest1; pw = 1'b1; end
        if (mem_write(r.ctrl) && r.waddr == A_PSW) begin p = r.dest2; pw = 1'b1; end
        cy <= r.flag_we[2] ? r.cy : pw ? p[7] : cy;
        ac <= r.flag_we[1] ? r.ac : pw ? p[6] : ac;
        ov <= r.flag_we[0] ? r.ov : pw ? p[2] : ov;
      end else if (in_valid) begin
        out        <= '0;
        out.ctrl   <= WR_NO;
        out.d1addr <= NO_ADDR;
        out.waddr  <= NO_ADDR;
      end
    end
  end

endmodule
