// tb_board_bus_if: the bus interface on its own, with a stand-in for the
// array that answers a read with a value derived from the operand. Checks
// that accepted requests reach the array one cycle later with the right
// module selects, that writes go back to back, that a read holds bus_ready
// low for one cycle and returns two cycles after acceptance, and that rst
// returns its status in bit 0.
module tb_board_bus_if;
  import space_pkg::*;
  localparam int MODS = 6;
  logic               clk = 0, rst_n = 0, bus_valid = 0, bus_ready, bus_rvalid, arr_stat;
  logic [MODS-1:0]    bus_msel = '0, arr_cs;
  logic [INSTR_W-1:0] bus_instr = '0, arr_instr;
  word_t              bus_wdata = '0, bus_rdata, arr_data, arr_dout;
  int                 checks = 0, failures = 0;

  board_bus_if #(.MODS(MODS)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Array stand-in: registers the operand of an executed read (like a chip).
  always_ff @(posedge clk) begin
    arr_dout <= (|arr_cs && arr_instr[5]) ? ~arr_data : '1;
    arr_stat <= |arr_cs && arr_data[0];
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic [6:0] i;
      logic [5:0] s;
      word_t      d;
      int         waited;
      bit         rd;
      rd = $urandom_range(0, 2) == 0;
      i  = rd ? {3'b011, 4'($urandom)} : {3'b001, 4'($urandom)};   // rfi-type or write-type
      if (rd && $urandom_range(0, 1)) i[6:4] = 3'b010;              // rst
      s  = 6'($urandom) | 6'd1;
      d  = {$urandom, $urandom};
      @(negedge clk);
      bus_valid = 1; bus_instr = i; bus_msel = s; bus_wdata = d;
      #1 check(bus_ready, "ready when idle");
      @(negedge clk);
      bus_valid = 0;
      check(arr_cs == s && arr_instr == i && arr_data == d, "issue one cycle after acceptance");
      check(bus_ready == !rd, "ready low only while a read executes");
      check(!bus_rvalid, "no data yet");
      if (rd) begin
        @(negedge clk);
        check(bus_rvalid, "read returns two cycles after acceptance");
        if (i[6:4] == 3'b010) check(bus_rdata == word_t'(d[0]), "rst status in bit 0");
        else                  check(bus_rdata == ~d, "read data");
        check(arr_cs == '0, "nothing issued during the wait");
      end
    end
    // Back-to-back writes: one accepted per cycle.
    @(negedge clk);
    for (int k = 0; k < 5; k++) begin
      bus_valid = 1; bus_instr = {3'b001, 4'(k)}; bus_msel = '1; bus_wdata = word_t'(k);
      #1 check(bus_ready, "write accepted every cycle");
      @(negedge clk);
      check(arr_cs == '1 && arr_data == word_t'(k), "pipelined issue");
    end
    bus_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
