// board_bus_if: the memory-mapped bus interface of a SPACE board.
//
// The node processor drives a request with the SPACE instruction and a module
// subset on the address lines and the 36-bit operand on the data lines. An
// accepted request (bus_valid && bus_ready) is registered and issued to the
// selected modules in the next cycle, as one chip-select bit per module.
// Writes, searches and register writes are pipelined: one is accepted every
// cycle. Reads (rfi, rst, rwr, rmr: the RW bit set) have to wait for the
// returned value: while a read executes bus_ready is low, and the value comes
// back on bus_rdata with bus_rvalid two cycles after acceptance, when the next
// request may already be accepted. So a read occupies the bus for two cycles
// and anything else for one. For rst the status bit is returned in bit 0 of
// bus_rdata with all other bits 0. The handshake, the 36-bit data lines and
// the field layout of the address are this design's choices.
module board_bus_if
  import space_pkg::*;
#(
  parameter int unsigned MODS = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  // node processor side
  input  logic               bus_valid,
  output logic               bus_ready,
  input  logic [MODS-1:0]    bus_msel,
  input  logic [INSTR_W-1:0] bus_instr,
  input  word_t              bus_wdata,
  output logic               bus_rvalid,
  output word_t              bus_rdata,
  // array side
  output logic [MODS-1:0]    arr_cs,
  output logic [INSTR_W-1:0] arr_instr,
  output word_t              arr_data,
  input  word_t              arr_dout,
  input  logic               arr_stat
);
  logic            iss_v, ret_v, ret_rst;
  logic [MODS-1:0] iss_msel;

  function automatic logic is_read(logic [INSTR_W-1:0] i);
    return i[5];                      // RW bit
  endfunction
  function automatic logic is_rst(logic [INSTR_W-1:0] i);
    return i[6:4] == 3'b010;          // CD=0, RW=1, TS=0
  endfunction

  assign bus_ready = !(iss_v && is_read(arr_instr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iss_v     <= 1'b0;
      iss_msel  <= '0;
      arr_instr <= '0;
      arr_data  <= '0;
      ret_v     <= 1'b0;
      ret_rst   <= 1'b0;
    end else begin
      iss_v   <= bus_valid && bus_ready;
      ret_v   <= iss_v && is_read(arr_instr);
      ret_rst <= is_rst(arr_instr);
      if (bus_valid && bus_ready) begin
        iss_msel  <= bus_msel;
        arr_instr <= bus_instr;
        arr_data  <= bus_wdata;
      end
    end
  end

  assign arr_cs     = iss_v ? iss_msel : '0;
  assign bus_rvalid = ret_v;
  assign bus_rdata  = ret_rst ? word_t'(arr_stat) : arr_dout;

  // A request must stay stable while it waits for bus_ready.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      bus_valid && !bus_ready |=> bus_valid && $stable(bus_instr) && $stable(bus_msel) && $stable(bus_wdata);
  endproperty
  a_hold: assert property (p_hold) else $error("bus request changed while stalled");
endmodule
