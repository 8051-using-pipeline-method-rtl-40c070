// pa_wb: write-back (WB) stage of the pipelined 8051.
//
// Takes the result record of EXE and, by its write-back control, turns it into
// the MemWrite record for MEM_INTERFACE and the jump signal for ID:
//
//   ACC, ACC_MEM, DPTR, SP_MEM  write dest1 to its address (ACC, DPL, SP, ...)
//   MEM, MEM_WB, MEMWB, ACC_MEM, SP_MEM, DPTR, JMP_MEM, JMP_MEMWB
//                               write dest2 to the write-back address
//   JMP, CJMP, JMP_MEM, JMP_MEMWB  raise jmp with the target when taken
//   CY (and any other)          flags only, as EXE marked them
//   NO                          nothing (also used for dropped instructions)
//
// Every record leaving WB (wb_valid) retires one lock entry in MEM_INTERFACE.
// The stage is combinational and always ready: the record is held in the EXE
// output register for exactly one cycle, and the memory write happens at the end
// of that cycle.
//
// The write-back controls are the design's; the two write ports of the MemWrite
// record are this implementation's choice.
module pa_wb
  import pa8051_pkg::*;
(
  input  logic        in_valid,
  input  exe2wb_t     in,
  output logic        wb_valid,
  output mem_write_t  mw,
  output logic        jmp,
  output logic [15:0] jmp_addr
);

  logic d1w, d2w, jmpc;
  always_comb begin
    d1w  = in.ctrl inside {WR_ACC, WR_ACC_MEM, WR_DPTR, WR_SP_MEM} && in.d1addr != NO_ADDR;
    d2w  = in.ctrl inside {WR_MEM, WR_MEM_WB, WR_MEMWB, WR_ACC_MEM, WR_SP_MEM, WR_DPTR,
                           WR_JMP_MEM, WR_JMP_MEMWB} && in.waddr != NO_ADDR;
    jmpc = in.ctrl inside {WR_JMP, WR_CJMP, WR_JMP_MEM, WR_JMP_MEMWB};
  end

  assign wb_valid   = in_valid;
  assign mw.w1_en   = d1w;
  assign mw.w1_addr = in.d1addr;
  assign mw.w1_data = in.dest1;
  assign mw.w2_en   = d2w;
  assign mw.w2_addr = in.waddr;
  assign mw.w2_data = in.dest2;
  assign mw.flag_we = (in.ctrl == WR_NO) ? 3'b000 : in.flag_we;
  assign mw.cy      = in.cy;
  assign mw.ac      = in.ac;
  assign mw.ov      = in.ov;
  assign jmp        = in_valid && jmpc && in.taken;
  assign jmp_addr   = in.jaddr;

endmodule
