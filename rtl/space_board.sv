// space_board: a SPACE board of a PADMAVATI node, six SPACE modules behind a
// memory-mapped bus interface.
//
// Each request names any subset of the six modules; the selected modules act
// as a single SPACE chip of up to 10656 words, and the others do nothing. The
// modules' REQ lines go through one more stage of priority resolution (a
// priority_tree with one input per module) that gives each module its PRQ,
// and their flag chains are joined module to module; the two ends of the
// board's chain read 0. As with chips, a deselected module drives no flag, so
// selected modules must be adjacent for the chain to run through them. Read
// data of the modules are combined as a pulled-up wired bus. Timing is that of
// board_bus_if: an instruction executes the cycle after it is accepted, and a
// read returns two cycles after acceptance.
module space_board
  import space_pkg::*;
#(
  parameter int unsigned MODS  = 6,
  parameter int unsigned CHIPS = 12,
  parameter int unsigned WORDS = 148,
  parameter int unsigned RADIX = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               bus_valid,
  output logic               bus_ready,
  input  logic [MODS-1:0]    bus_msel,
  input  logic [INSTR_W-1:0] bus_instr,
  input  word_t              bus_wdata,
  output logic               bus_rvalid,
  output word_t              bus_rdata
);
  logic [MODS-1:0]    cs;
  logic [INSTR_W-1:0] instr;
  word_t              din, arr_dout;
  logic               arr_stat, any_unused;

  board_bus_if #(.MODS(MODS)) u_bus (
    .clk(clk), .rst_n(rst_n),
    .bus_valid(bus_valid), .bus_ready(bus_ready), .bus_msel(bus_msel),
    .bus_instr(bus_instr), .bus_wdata(bus_wdata),
    .bus_rvalid(bus_rvalid), .bus_rdata(bus_rdata),
    .arr_cs(cs), .arr_instr(instr), .arr_data(din),
    .arr_dout(arr_dout), .arr_stat(arr_stat)
  );

  word_t           m_dout [MODS];
  logic [MODS-1:0] m_doe_unused, m_stat, m_req, m_prq, m_first_unused;
  logic [MODS-1:0] m_prf_in, m_prf_out, m_prf_oe, m_nxf_in, m_nxf_out, m_nxf_oe;

  for (genvar m = 0; m < MODS; m++) begin : g_mod
    space_module #(.CHIPS(CHIPS), .WORDS(WORDS), .RADIX(RADIX)) u_mod (
      .clk(clk), .rst_n(rst_n), .cs(cs[m]), .instr(instr), .din(din),
      .dout(m_dout[m]), .doe(m_doe_unused[m]), .stat(m_stat[m]),
      .prf_in(m_prf_in[m]), .prf_out(m_prf_out[m]), .prf_oe(m_prf_oe[m]),
      .nxf_in(m_nxf_in[m]), .nxf_out(m_nxf_out[m]), .nxf_oe(m_nxf_oe[m]),
      .req(m_req[m]), .prq(m_prq[m])
    );
    if (m == 0) begin : g_head
      assign m_prf_in[m] = 1'b0;           // f[-1] of the board
    end else begin : g_link_prev
      assign m_prf_in[m] = m_nxf_oe[m-1] & m_nxf_out[m-1];
    end
    if (m == MODS - 1) begin : g_tail
      assign m_nxf_in[m] = 1'b0;           // f[N] of the board
    end else begin : g_link_next
      assign m_nxf_in[m] = m_prf_oe[m+1] & m_prf_out[m+1];
    end
  end

  priority_tree #(.N(MODS), .RADIX(MODS)) u_board_tree (
    .prq(1'b0), .req(m_req), .first(m_first_unused), .prior(m_prq), .any(any_unused)
  );

  always_comb begin
    arr_dout = '1;
    for (int m = 0; m < MODS; m++) arr_dout &= m_dout[m];
  end
  assign arr_stat = |m_stat;
endmodule
