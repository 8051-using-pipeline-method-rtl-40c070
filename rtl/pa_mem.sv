// pa_mem: data memory of the pipelined 8051 (the MEM unit).
//
// Holds the 128-byte internal RAM (addresses 00h-7Fh) and the special function
// registers that live outside MEM_INTERFACE: SP, DPL, DPH, B and the four port
// latches P0-P3, whose values are driven out of the core. ACC and PSW are kept in
// MEM_INTERFACE, as the design places them there for speed. Other SFR addresses
// read as 0 and ignore writes.
//
// Interface: four combinational read ports (a pointer port paddr/pdata whose
// result addresses the other three, and raddr/rdata) and two write ports
// (we/waddr/wdata) that take effect on the rising clock edge; when both write
// ports hit the same address port 2 wins. The 128-byte size and the port outputs
// follow the design; the number of ports is this implementation's choice, made so
// that one operand fetch of the OF stage completes in a single cycle.
//
// Reset (synchronous, active low): SP = 07h, ports = FFh, DPTR and B = 0. The RAM
// is not cleared.
module pa_mem
  import pa8051_pkg::*;
#(
  parameter int unsigned RAM_BYTES = RAM_SIZE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] paddr,          // pointer read port (Ri or SP)
  output logic [7:0] pdata,
  input  logic [7:0] raddr [3],
  output logic [7:0] rdata [3],
  input  logic       we    [2],
  input  logic [7:0] waddr [2],
  input  logic [7:0] wdata [2],
  output logic [7:0] p0_out,
  output logic [7:0] p1_out,
  output logic [7:0] p2_out,
  output logic [7:0] p3_out
);

  logic [7:0] ram [RAM_BYTES];
  logic [7:0] sp, dpl, dph, b_reg;

  function automatic logic [7:0] rd(input logic [7:0] a);
    if (!a[7]) return ram[a[6:0]];
    unique case (a)
      A_P0:    return p0_out;
      A_P1:    return p1_out;
      A_P2:    return p2_out;
      A_P3:    return p3_out;
      A_SP:    return sp;
      A_DPL:   return dpl;
      A_DPH:   return dph;
      A_B:     return b_reg;
      default: return 8'h00;
    endcase
  endfunction

  assign pdata    = rd(paddr);
  assign rdata[0] = rd(raddr[0]);
  assign rdata[1] = rd(raddr[1]);
  assign rdata[2] = rd(raddr[2]);

  always_ff @(posedge clk) begin
    for (int i = 0; i < 2; i++) begin
      if (we[i] && !waddr[i][7]) ram[waddr[i][6:0]] <= wdata[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sp <= 8'h07; dpl <= 8'h00; dph <= 8'h00; b_reg <= 8'h00;
      p0_out <= 8'hFF; p1_out <= 8'hFF; p2_out <= 8'hFF; p3_out <= 8'hFF;
    end else begin
      for (int i = 0; i < 2; i++) begin
        if (we[i]) begin
          unique case (waddr[i])
            A_P0:  p0_out <= wdata[i];
            A_P1:  p1_out <= wdata[i];
            A_P2:  p2_out <= wdata[i];
            A_P3:  p3_out <= wdata[i];
            A_SP:  sp     <= wdata[i];
            A_DPL: dpl    <= wdata[i];
            A_DPH: dph    <= wdata[i];
            A_B:   b_reg  <= wdata[i];
            default: ;
          endcase
        end
      end
    end
  end

endmodule
