// padmavati_space: the associative array of the PADMAVATI machine, sixteen
// SPACE boards of 10656 words each, 170496 words in all.
//
// Each board belongs to one processor node, which acts as its microcode
// sequencer, so the boards run independently: every node has its own bus
// port here (index n of each port array). The nodes' processors, the routing
// switch that joins them and the host workstation are outside this design.
// Per-board behaviour and timing are those of space_board.
module padmavati_space
  import space_pkg::*;
#(
  parameter int unsigned NODES = 16,
  parameter int unsigned MODS  = 6,
  parameter int unsigned CHIPS = 12,
  parameter int unsigned WORDS = 148,
  parameter int unsigned RADIX = 12
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NODES-1:0]              bus_valid,
  output logic [NODES-1:0]              bus_ready,
  input  logic [NODES-1:0][MODS-1:0]    bus_msel,
  input  logic [NODES-1:0][INSTR_W-1:0] bus_instr,
  input  word_t [NODES-1:0]             bus_wdata,
  output logic [NODES-1:0]              bus_rvalid,
  output word_t [NODES-1:0]             bus_rdata
);
  for (genvar n = 0; n < NODES; n++) begin : g_node
    space_board #(.MODS(MODS), .CHIPS(CHIPS), .WORDS(WORDS), .RADIX(RADIX)) u_board (
      .clk(clk), .rst_n(rst_n),
      .bus_valid(bus_valid[n]), .bus_ready(bus_ready[n]), .bus_msel(bus_msel[n]),
      .bus_instr(bus_instr[n]), .bus_wdata(bus_wdata[n]),
      .bus_rvalid(bus_rvalid[n]), .bus_rdata(bus_rdata[n])
    );
  end
endmodule
