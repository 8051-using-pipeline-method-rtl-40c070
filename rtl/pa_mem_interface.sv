// pa_mem_interface: MEM_INTERFACE of the pipelined 8051.
//
// Sits between the read arbiter, the WB stage and the data memory. It owns ACC
// and PSW, serves one operand read request (MemRead) per cycle, applies the writes
// of the WB stage, and runs the lock mechanism that keeps read-after-write hazards
// away:
//
//  * Every granted OF read pushes a lock entry holding the two addresses its
//    instruction will write (dest1, dest2) and whether it writes the CY/AC/OV
//    flags. The newest entry is RD11/RD12, the one before it RD21/RD22; an empty
//    address is 255. Each instruction that leaves WB retires the oldest entry.
//  * A source address equal to RD11 or RD12 of a pending entry is forwarded: the
//    grant carries a forward code telling EXE to take the value from dest1 or
//    dest2 of the instruction ahead of it (data hazard type 1).
//  * The grant is withheld (valid = 0) and the arbiter retries when: the address
//    matches RD21/RD22 (that instruction writes it back in this very cycle); the
//    pointer register of an @Ri operand is pending (type 2); the bank bits of PSW
//    are pending for an Rn operand (type 3); PSW itself is read while a flag
//    writer is pending; or a value cannot be forwarded through the two EXE
//    operand slots.
//  * On a taken jump (jmp from WB) all lock addresses are cleared and the local
//    colour flips. A request whose colour differs from the local colour belongs
//    to a flushed path: it is granted at once, with no forwarding and an empty
//    lock, and EXE drops it later.
//
// The lock registers, the forwarding from dest1/dest2, the three hazard types and
// the place of ACC and PSW follow the design. The synchronous one-request-per-cycle
// protocol, the retire-based release of locks, the colour check here and the
// stall on RD21/RD22 are this implementation's choices.
module pa_mem_interface
  import pa8051_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // MemRead from the arbiter
  input  logic       req_valid,
  input  mem_read_t  req,
  output logic       rsp_valid,   // request granted this cycle (data valid)
  output mem_rdata_t rsp,
  // WB side
  input  logic       wb_valid,    // an instruction leaves WB this cycle
  input  mem_write_t wb_write,
  input  logic       jmp,         // taken jump signalled by WB this cycle
  // status
  output logic [1:0] pending,     // instructions between OF and the end of WB
  output logic [7:0] acc_out,
  output logic [7:0] psw_out,
  // MEM
  output logic [7:0] m_paddr,
  input  logic [7:0] m_pdata,
  output logic [7:0] m_raddr [3],
  input  logic [7:0] m_rdata [3],
  output logic       m_we    [2],
  output logic [7:0] m_waddr [2],
  output logic [7:0] m_wdata [2]
);

  typedef struct packed {
    logic       v;
    logic [7:0] a1;
    logic [7:0] a2;
    logic       fl;
  } lock_t;

  lock_t      rd1, rd2;     // rd1 = RD11/RD12 (newest), rd2 = RD21/RD22
  logic [7:0] acc, psw;
  logic       color;

  logic [1:0] rs;
  assign rs      = psw[4:3];
  assign acc_out = acc;
  assign psw_out = {psw[7:1], ^acc};
  assign pending = 2'(rd1.v) + 2'(rd2.v);

  function automatic logic hit_any(input lock_t e, input logic [7:0] a);
    return e.v && a != NO_ADDR && (e.a1 == a || e.a2 == a);
  endfunction

  // ---------------------------------------------------------------- pointer port
  // port 0 reads the Ri pointer or SP; only one of them is needed per request
  logic       need_ri, need_sp, ri;
  logic [7:0] ptr_addr;
  always_comb begin
    need_ri  = req.s1.kind == K_REGI || req.s2.kind == K_REGI || req.w.kind == K_REGI;
    need_sp  = req.s1.kind inside {K_SPI, K_SPM, K_SP1} || req.s2.kind inside {K_SPI, K_SPM, K_SP1}
            || req.s3.kind inside {K_SPI, K_SPM, K_SP1} || req.w.kind inside {K_SPI, K_SPM, K_SP1};
    ptr_addr = NO_ADDR;
    ri = (req.s1.kind == K_REGI) ? req.s1.addr[0]
       : (req.s2.kind == K_REGI) ? req.s2.addr[0] : req.w.addr[0];
    if (need_ri) begin
      ptr_addr = {3'b000, rs, 2'b00, ri};
    end else if (need_sp) begin
      ptr_addr = A_SP;
    end
  end
  assign m_paddr = ptr_addr;

  function automatic logic [7:0] resolve(input mem_acc_t a, input logic [1:0] bank,
                                         input logic [7:0] ptr);
    unique case (a.kind)
      K_DIR:   return a.addr;
      K_REG:   return {3'b000, bank, a.addr[2:0]};
      K_REGI:  return {1'b0, ptr[6:0]};
      K_BIT:   return bit_byte(a.addr);
      K_SPI:   return {1'b0, ptr[6:0]};
      K_SPM:   return {1'b0, 7'(ptr[6:0] - 7'd1)};
      K_SP1:   return {1'b0, 7'(ptr[6:0] + 7'd1)};
      default: return NO_ADDR;
    endcase
  endfunction

  logic [7:0] a_s1, a_s2, a_s3, a_w;
  assign a_s1 = resolve(req.s1, rs, m_pdata);
  assign a_s2 = resolve(req.s2, rs, m_pdata);
  assign a_s3 = resolve(req.s3, rs, m_pdata);
  assign a_w  = resolve(req.w,  rs, m_pdata);
  assign m_raddr[0] = a_s1;
  assign m_raddr[1] = a_s2;
  assign m_raddr[2] = a_s3;

  function automatic logic [7:0] value(input logic [7:0] a, input logic [7:0] mdata,
                                       input logic [7:0] acc_v, input logic [7:0] psw_v);
    if (a == A_ACC) return acc_v;
    if (a == A_PSW) return {psw_v[7:1], ^acc_v};
    return mdata;
  endfunction

  // ---------------------------------------------------------------- hazard check
  logic     stall;
  fwd_t     fwd;
  logic     mismatch;
  logic     psw_locked, flag_locked;

  always_comb begin
    psw_locked  = hit_any(rd1, A_PSW) || hit_any(rd2, A_PSW);
    flag_locked = (rd1.v && rd1.fl) || (rd2.v && rd2.fl);
    mismatch    = req.color != color;
    stall       = 1'b0;
    fwd         = '{s1: FW_NO, s2: FW_NO};
    // bank select (type 3)
    if (req.s1.kind inside {K_REG, K_REGI} || req.s2.kind inside {K_REG, K_REGI}
        || req.w.kind inside {K_REG, K_REGI})
      if (psw_locked) stall = 1'b1;
    // pointer register or SP (type 2)
    if ((need_ri || need_sp) && (hit_any(rd1, ptr_addr) || hit_any(rd2, ptr_addr)))
      stall = 1'b1;
    // PSW as data
    if ((a_s1 == A_PSW || a_s2 == A_PSW || a_s3 == A_PSW) && (psw_locked || flag_locked))
      stall = 1'b1;
    // slot 1 and 2: forward from the instruction ahead, or wait for the one before
    if (a_s1 != NO_ADDR && a_s1 != A_PSW) begin
      if (rd1.v && rd1.a1 == a_s1)      fwd.s1 = FW_D1;
      else if (rd1.v && rd1.a2 == a_s1) fwd.s1 = FW_D2;
      else if (hit_any(rd2, a_s1))      stall  = 1'b1;
    end
    if (a_s2 != NO_ADDR && a_s2 != A_PSW) begin
      if (rd1.v && rd1.a1 == a_s2)      fwd.s2 = FW_D1;
      else if (rd1.v && rd1.a2 == a_s2) fwd.s2 = FW_D2;
      else if (hit_any(rd2, a_s2))      stall  = 1'b1;
    end
    if (hit_any(rd1, a_s3) || hit_any(rd2, a_s3)) stall = 1'b1;
    if (mismatch) begin
      stall = 1'b0;
      fwd   = '{s1: FW_NO, s2: FW_NO};
    end
    // the jump cycle itself: whatever sits in OF is on the flushed path
    if (jmp) stall = 1'b1;
  end

  assign rsp_valid = req_valid && !stall;
  assign rsp.d1    = value(a_s1, m_rdata[0], acc, psw);
  assign rsp.d2    = value(a_s2, m_rdata[1], acc, psw);
  assign rsp.d3    = value(a_s3, m_rdata[2], acc, psw);
  assign rsp.waddr = a_w;
  assign rsp.fwd   = fwd;

  // ---------------------------------------------------------------- writes
  always_comb begin
    m_we[0]    = wb_valid && wb_write.w1_en && wb_write.w1_addr != A_ACC && wb_write.w1_addr != A_PSW;
    m_waddr[0] = wb_write.w1_addr;
    m_wdata[0] = wb_write.w1_data;
    m_we[1]    = wb_valid && wb_write.w2_en && wb_write.w2_addr != A_ACC && wb_write.w2_addr != A_PSW;
    m_waddr[1] = wb_write.w2_addr;
    m_wdata[1] = wb_write.w2_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= 8'h00;
      psw <= 8'h00;
    end else if (wb_valid) begin
      logic [7:0] p;
      p = psw;
      if (wb_write.w1_en && wb_write.w1_addr == A_ACC) acc <= wb_write.w1_data;
      if (wb_write.w2_en && wb_write.w2_addr == A_ACC) acc <= wb_write.w2_data;
      if (wb_write.w1_en && wb_write.w1_addr == A_PSW) p = wb_write.w1_data;
      if (wb_write.w2_en && wb_write.w2_addr == A_PSW) p = wb_write.w2_data;
      if (wb_write.flag_we[2]) p[7] = wb_write.cy;
      if (wb_write.flag_we[1]) p[6] = wb_write.ac;
      if (wb_write.flag_we[0]) p[2] = wb_write.ov;
      psw <= p;
    end
  end

  // ---------------------------------------------------------------- lock registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd1   <= '{v: 1'b0, a1: NO_ADDR, a2: NO_ADDR, fl: 1'b0};
      rd2   <= '{v: 1'b0, a1: NO_ADDR, a2: NO_ADDR, fl: 1'b0};
      color <= 1'b0;
    end else begin
      lock_t n1, n2;
      n1 = rd1;
      n2 = rd2;
      // retire the oldest pending instruction
      if (wb_valid) begin
        if (n2.v) n2.v = 1'b0;
        else      n1.v = 1'b0;
      end
      // RESET_LOCK on a taken jump
      if (jmp) begin
        n1.a1 = NO_ADDR; n1.a2 = NO_ADDR; n1.fl = 1'b0;
        n2.a1 = NO_ADDR; n2.a2 = NO_ADDR; n2.fl = 1'b0;
        color <= ~color;
      end
      // LOCK_MEM: the granted instruction becomes RD11/RD12
      if (rsp_valid && req.lock) begin
        n2 = n1;
        n1.v  = 1'b1;
        n1.a1 = mismatch ? NO_ADDR : req.d1addr;
        n1.a2 = mismatch ? NO_ADDR : a_w;
        n1.fl = mismatch ? 1'b0    : req.wflags;
      end
      rd1 <= n1;
      rd2 <= n2;
    end
  end

  // at most two instructions can be between OF and the end of WB
  a_lock_depth: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid && req.lock |-> !(rd1.v && rd2.v && !wb_valid));

endmodule
