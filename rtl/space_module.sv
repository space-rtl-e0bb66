// space_module: a SPACE module, twelve cascaded SPACE chips that behave as one
// 1776-word chip.
//
// All chips share the instruction, operand and chip select. Their REQ outputs
// feed one stage of external priority resolution (a priority_tree with one
// input per chip), whose `prior` outputs are the chips' PRQ inputs, so only the
// first requesting chip of the module (and none, when an earlier module
// requests) answers a read or takes a wfi. The flag chains are joined chip to
// chip through the PRF/NXF pins: a pin that its driver does not enable reads
// as 0. The chips' read buses are combined as a pulled-up wired bus (AND of
// the chips' outputs, each all ones when not driving). The module brings out
// the same pins as a single chip, so modules cascade exactly like chips.
// Timing is that of space_chip; the wiring adds no registers. The on-module
// bus buffers are electrical and are not modelled.
module space_module
  import space_pkg::*;
#(
  parameter int unsigned CHIPS = 12,
  parameter int unsigned WORDS = 148,
  parameter int unsigned RADIX = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cs,
  input  logic [INSTR_W-1:0] instr,
  input  word_t              din,
  output word_t              dout,
  output logic               doe,
  output logic               stat,
  input  logic               prf_in,
  output logic               prf_out,
  output logic               prf_oe,
  input  logic               nxf_in,
  output logic               nxf_out,
  output logic               nxf_oe,
  output logic               req,
  input  logic               prq
);
  word_t            c_dout [CHIPS];
  logic [CHIPS-1:0] c_doe, c_stat, c_req, c_prq, c_first_unused;
  logic [CHIPS-1:0] c_prf_in, c_prf_out, c_prf_oe, c_nxf_in, c_nxf_out, c_nxf_oe;

  for (genvar c = 0; c < CHIPS; c++) begin : g_chip
    space_chip #(.WORDS(WORDS), .RADIX(RADIX)) u_chip (
      .clk(clk), .rst_n(rst_n), .cs(cs), .instr(instr), .din(din),
      .dout(c_dout[c]), .doe(c_doe[c]), .stat(c_stat[c]),
      .prf_in(c_prf_in[c]), .prf_out(c_prf_out[c]), .prf_oe(c_prf_oe[c]),
      .nxf_in(c_nxf_in[c]), .nxf_out(c_nxf_out[c]), .nxf_oe(c_nxf_oe[c]),
      .req(c_req[c]), .prq(c_prq[c])
    );

    if (c == 0) begin : g_head
      assign c_prf_in[c] = prf_in;
    end else begin : g_link_prev
      assign c_prf_in[c] = c_nxf_oe[c-1] & c_nxf_out[c-1];
    end
    if (c == CHIPS - 1) begin : g_tail
      assign c_nxf_in[c] = nxf_in;
    end else begin : g_link_next
      assign c_nxf_in[c] = c_prf_oe[c+1] & c_prf_out[c+1];
    end
  end

  priority_tree #(.N(CHIPS), .RADIX(CHIPS)) u_ext_tree (
    .prq(prq), .req(c_req), .first(c_first_unused), .prior(c_prq), .any(req)
  );

  always_comb begin
    dout = '1;
    for (int c = 0; c < CHIPS; c++) dout &= c_dout[c];
  end

  assign doe     = |c_doe;
  assign stat    = |c_stat;
  assign prf_out = c_prf_out[0];
  assign prf_oe  = c_prf_oe[0];
  assign nxf_out = c_nxf_out[CHIPS-1];
  assign nxf_oe  = c_nxf_oe[CHIPS-1];
endmodule
