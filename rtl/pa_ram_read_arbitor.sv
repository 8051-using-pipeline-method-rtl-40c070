// pa_ram_read_arbitor: RAM_READ_ARBITOR of the pipelined 8051.
//
// Both the ID stage (return addresses and the stack pointer for calls and
// returns) and the OF stage (instruction operands) read data memory through one
// MEM_INTERFACE request port. This block picks one requester per cycle, passes
// its MemRead on, and routes the answer back. MEM_INTERFACE answers valid = 0
// while a location is locked; the requester then simply keeps its request up and
// the arbiter re-issues it every cycle until valid = 1, which is the retry loop of
// the design.
//
// Priority: OF wins over ID, because the instruction in OF is older. In practice
// ID only reads when the pipeline behind it is empty, so the two rarely collide.
// Channel protocol (this implementation's choice): a request is a level held
// until its grant; the grant (id_gnt / of_gnt) comes in the same cycle as the data.
module pa_ram_read_arbitor
  import pa8051_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // ID port
  input  logic       id_req,
  input  mem_read_t  id_read,
  output logic       id_gnt,
  output mem_rdata_t id_data,
  // OF port
  input  logic       of_req,
  input  mem_read_t  of_read,
  output logic       of_gnt,
  output mem_rdata_t of_data,
  // MEM_INTERFACE port
  output logic       mi_req,
  output mem_read_t  mi_read,
  input  logic       mi_valid,
  input  mem_rdata_t mi_data
);

  logic sel_of;
  assign sel_of  = of_req;
  assign mi_req  = of_req || id_req;
  assign mi_read = sel_of ? of_read : id_read;
  assign of_gnt  = sel_of && mi_valid;
  assign id_gnt  = !sel_of && id_req && mi_valid;
  assign of_data = mi_data;
  assign id_data = mi_data;

  // a requester keeps its request until it is granted
  a_of_hold: assert property (@(posedge clk) disable iff (!rst_n)
    of_req && !of_gnt |=> of_req);
  a_one_gnt: assert property (@(posedge clk) disable iff (!rst_n) !(of_gnt && id_gnt));

endmodule
