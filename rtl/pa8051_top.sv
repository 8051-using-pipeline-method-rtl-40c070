// pa8051_top: the pipelined 8051 core (PA8051).
//
// Five pipeline stages and a shared memory unit, wired as in the design's top
// level:
//
//   ROM -> IF -> ID -> OF -> EXE -> WB
//                 |     |            |
//                 +-> RAM_READ_ARBITOR -> MEM_INTERFACE (ACC, PSW, locks) -> MEM
//                                              ^---------- Write_Back -----------+
//   WB --jmp--> ID (taken conditional jumps; ID redirects IF and flips its colour)
//
// The stages talk over valid/ready channels and each holds one instruction, so
// the synchronous pipeline models the design's self-timed one, where each stage
// hands on an instruction as soon as the next one is free. Read-after-write
// hazards are handled by the lock registers in MEM_INTERFACE (forward or stall),
// control hazards by the colour bit checked in EXE.
//
// Interface: the program ROM is outside the core (rom_rd/rom_addr out, rom_data
// back one cycle later), like the ROM model of the design's test environment. A
// second read port (code_rd/code_addr/code_data, same timing) serves MOVC, so a
// table lookup does not disturb instruction fetch. The port latches P0-P3 are the
// outputs. Reset is synchronous and active low; after reset the core fetches
// from address 0000h.
module pa8051_top
  import pa8051_pkg::*;
#(
  parameter int unsigned BUF_BYTES = 32,
  parameter int unsigned ROM_ABITS = ROM_AW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 rom_rd,
  output logic [ROM_ABITS-1:0] rom_addr,
  input  logic [7:0]           rom_data,
  output logic                 code_rd,
  output logic [ROM_ABITS-1:0] code_addr,
  input  logic [7:0]           code_data,
  output logic [7:0]           p0_out,
  output logic [7:0]           p1_out,
  output logic [7:0]           p2_out,
  output logic [7:0]           p3_out
);

  // IF <-> ID
  logic        if_valid, if_ready, redirect, if_miss;
  logic [7:0]  if_byte;
  logic [15:0] if_pc, redirect_pc, id_code_addr;
  // ID -> OF
  logic        id_valid, id_ready;
  id2of_t      id_out;
  // OF -> EXE -> WB
  logic        of_valid, exe_valid, exe_flush;
  of2exe_t     of_out;
  exe2wb_t     exe_out;
  // WB
  logic        wb_valid, jmp;
  logic [15:0] jmp_addr;
  mem_write_t  mw;
  // arbiter
  logic        id_mr_req, id_mr_gnt, of_mr_req, of_mr_gnt, mi_req, mi_valid;
  mem_read_t   id_mr, of_mr, mi_read;
  mem_rdata_t  id_md, of_md, mi_data;
  logic [1:0]  pending;
  logic [7:0]  acc, psw;
  // MEM
  logic [7:0]  m_paddr, m_pdata;
  logic [7:0]  m_raddr [3];
  logic [7:0]  m_rdata [3];
  logic        m_we    [2];
  logic [7:0]  m_waddr [2];
  logic [7:0]  m_wdata [2];

  pa_if #(.BUF_BYTES(BUF_BYTES), .ROM_ABITS(ROM_ABITS)) u_if (
    .clk, .rst_n,
    .rom_rd, .rom_addr, .rom_data,
    .out_valid(if_valid), .out_byte(if_byte), .out_pc(if_pc), .out_ready(if_ready),
    .redirect, .redirect_pc,
    .miss(if_miss)
  );

  pa_id u_id (
    .clk, .rst_n,
    .if_valid, .if_byte, .if_pc, .if_ready,
    .redirect, .redirect_pc,
    .out_valid(id_valid), .out(id_out), .out_ready(id_ready),
    .jmp, .jmp_addr,
    .mr_req(id_mr_req), .mr_read(id_mr), .mr_gnt(id_mr_gnt), .mr_data(id_md),
    .pending,
    .code_rd, .code_addr(id_code_addr), .code_data
  );
  assign code_addr = id_code_addr[ROM_ABITS-1:0];

  pa_of u_of (
    .clk, .rst_n,
    .in_valid(id_valid), .in(id_out), .in_ready(id_ready),
    .mr_req(of_mr_req), .mr_read(of_mr), .mr_gnt(of_mr_gnt), .mr_data(of_md),
    .out_valid(of_valid), .out(of_out)
  );

  pa_exe u_exe (
    .clk, .rst_n,
    .in_valid(of_valid), .in(of_out),
    .out_valid(exe_valid), .out(exe_out),
    .flush(exe_flush)
  );

  pa_wb u_wb (
    .in_valid(exe_valid), .in(exe_out),
    .wb_valid, .mw, .jmp, .jmp_addr
  );

  pa_ram_read_arbitor u_arb (
    .clk, .rst_n,
    .id_req(id_mr_req), .id_read(id_mr), .id_gnt(id_mr_gnt), .id_data(id_md),
    .of_req(of_mr_req), .of_read(of_mr), .of_gnt(of_mr_gnt), .of_data(of_md),
    .mi_req, .mi_read, .mi_valid, .mi_data
  );

  pa_mem_interface u_mi (
    .clk, .rst_n,
    .req_valid(mi_req), .req(mi_read), .rsp_valid(mi_valid), .rsp(mi_data),
    .wb_valid, .wb_write(mw), .jmp,
    .pending, .acc_out(acc), .psw_out(psw),
    .m_paddr, .m_pdata, .m_raddr, .m_rdata, .m_we, .m_waddr, .m_wdata
  );

  pa_mem u_mem (
    .clk, .rst_n,
    .paddr(m_paddr), .pdata(m_pdata), .raddr(m_raddr), .rdata(m_rdata),
    .we(m_we), .waddr(m_waddr), .wdata(m_wdata),
    .p0_out, .p1_out, .p2_out, .p3_out
  );

endmodule
