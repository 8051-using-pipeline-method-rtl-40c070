// pa_if: instruction fetch (IF) stage of the pipelined 8051.
//
// The stage is made of a ROM interface, two instruction buffers of BUF_BYTES
// bytes each and a fetch controller, as in the design. The buffers act as a small
// instruction cache in front of the program ROM:
//
//  * Each buffer holds one aligned block of BUF_BYTES bytes, with a tag (the
//    block number) and a valid bit per byte, so a byte can be used as soon as it
//    has arrived.
//  * When the byte at PC is in neither buffer, the controller refills one buffer
//    with the block holding PC, starting at PC's offset; afterwards the other
//    buffer is loaded with the following block, so a miss fetches two blocks
//    (64 bytes at the default size).
//  * While one buffer is being read, the other one is filled with the next block
//    if it does not hold it yet, so straight-line code finds its bytes ready when
//    it crosses into the next block.
//
// Interface: one instruction byte per cycle to ID over a valid/ready channel
// (out_valid, out_byte, out_pc, out_ready). redirect/redirect_pc, from ID, move
// PC to a jump target; the byte on the output in that cycle is dropped. The ROM
// port issues one address per cycle (rom_rd, rom_addr) and expects the byte one
// cycle later on rom_data.
//
// Buffer count, size and the refill rule follow the design; the block alignment,
// the per-byte valid bits and the ROM timing are this implementation's choices.
module pa_if
  import pa8051_pkg::*;
#(
  parameter int unsigned BUF_BYTES = 32,
  parameter int unsigned ROM_ABITS = ROM_AW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // ROM interface
  output logic                 rom_rd,
  output logic [ROM_ABITS-1:0] rom_addr,
  input  logic [7:0]           rom_data,
  // to ID
  output logic                 out_valid,
  output logic [7:0]           out_byte,
  output logic [15:0]          out_pc,
  input  logic                 out_ready,
  // from ID
  input  logic                 redirect,
  input  logic [15:0]          redirect_pc,
  // status
  output logic                 miss        // no buffer holds the block of PC
);

  localparam int unsigned OW = $clog2(BUF_BYTES);
  localparam int unsigned BW = 16 - OW;

  logic [7:0]     bufd  [2][BUF_BYTES];
  logic [BW-1:0]  tag   [2];
  logic           tagv  [2];
  logic [BUF_BYTES-1:0] bval [2];

  logic [15:0]    pc;
  logic [BW-1:0]  blk;
  logic [OW-1:0]  off;
  assign blk = pc[15:OW];
  assign off = pc[OW-1:0];

  // fill engine
  logic           f_act;
  logic           f_buf;
  logic [BW-1:0]  f_blk;
  logic [OW-1:0]  f_idx;
  logic [OW:0]    f_cnt;
  // ROM answer pipeline
  logic           r_v;
  logic           r_buf;
  logic [BW-1:0]  r_blk;
  logic [OW-1:0]  r_idx;

  logic in0, in1, hit0, hit1, nxt0, nxt1;
  always_comb begin
    in0  = tagv[0] && tag[0] == blk;
    in1  = tagv[1] && tag[1] == blk;
    hit0 = in0 && bval[0][off];
    hit1 = in1 && bval[1][off];
    nxt0 = tagv[0] && tag[0] == BW'(blk + 1'b1);
    nxt1 = tagv[1] && tag[1] == BW'(blk + 1'b1);
  end

  assign out_valid = hit0 || hit1;
  assign out_byte  = hit0 ? bufd[0][off] : bufd[1][off];
  assign out_pc    = pc;
  assign miss      = !in0 && !in1;

  assign rom_rd   = f_act;
  assign rom_addr = ROM_ABITS'({f_blk, f_idx});

  // start of a new fill
  logic          start;
  logic          s_buf;
  logic [BW-1:0] s_blk;
  logic [OW-1:0] s_idx;
  always_comb begin
    start = 1'b0;
    s_buf = 1'b0;
    s_blk = blk;
    s_idx = off;
    if (!redirect) begin
      if (!in0 && !in1) begin
        // demand miss: keep a buffer that already holds the next block
        start = 1'b1;
        s_buf = nxt0 ? 1'b1 : 1'b0;
      end else if (!f_act && !(in0 ? nxt1 : nxt0)) begin
        // prefetch the next block into the other buffer
        start = 1'b1;
        s_buf = in0 ? 1'b1 : 1'b0;
        s_blk = BW'(blk + 1'b1);
        s_idx = '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc    <= '0;
      f_act <= 1'b0;
      f_buf <= 1'b0;
      f_blk <= '0;
      f_idx <= '0;
      f_cnt <= '0;
      r_v   <= 1'b0;
      r_buf <= 1'b0;
      r_blk <= '0;
      r_idx <= '0;
      for (int b = 0; b < 2; b++) begin
        tag[b]  <= '0;
        tagv[b] <= 1'b0;
        bval[b] <= '0;
      end
    end else begin
      // PC
      if (redirect)                    pc <= redirect_pc;
      else if (out_valid && out_ready) pc <= pc + 16'd1;
      // answer of the previous ROM read
      r_v   <= f_act;
      r_buf <= f_buf;
      r_blk <= f_blk;
      r_idx <= f_idx;
      if (r_v && tagv[r_buf] && tag[r_buf] == r_blk)
        bval[r_buf][r_idx] <= 1'b1;
      // fill engine
      if (start) begin
        f_act        <= 1'b1;
        f_buf        <= s_buf;
        f_blk        <= s_blk;
        f_idx        <= s_idx;
        f_cnt        <= '0;
        tag[s_buf]   <= s_blk;
        tagv[s_buf]  <= 1'b1;
        bval[s_buf]  <= '0;
      end else if (f_act) begin
        f_idx <= f_idx + 1'b1;
        f_cnt <= f_cnt + 1'b1;
        if (f_cnt == (OW+1)'(BUF_BYTES - 1)) f_act <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (r_v) bufd[r_buf][r_idx] <= rom_data;
  end

endmodule
