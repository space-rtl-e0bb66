// tb_flag_chain: random flag updates and select modes on a 16-word chain,
// including the f[-1] and f[N] inputs, against a bit-array model.
module tb_flag_chain;
  import space_pkg::*;
  localparam int W = 16;
  logic         clk = 0, rst_n = 0, prev_in = 0, next_in = 0, first, last;
  sel_e         sel_mode = SEL_ALL;
  logic [W-1:0] upd = '0, nxt = '0, flags, sel, mf;
  int           checks = 0, failures = 0;

  flag_chain #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mf = '0;
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      logic [W-1:0] es;
      sel_mode = sel_e'($urandom_range(0, 3));
      prev_in  = 1'($urandom);
      next_in  = 1'($urandom);
      upd      = W'($urandom);
      nxt      = W'($urandom);
      #1;
      for (int w = 0; w < W; w++)
        case (sel_mode)
          SEL_ALL:     es[w] = 1;
          SEL_FLAGGED: es[w] = mf[w];
          SEL_BEFORE:  es[w] = (w == W - 1) ? next_in : mf[w+1];
          default:     es[w] = (w == 0) ? prev_in : mf[w-1];
        endcase
      checks++;
      if (sel != es || flags != mf || first != mf[0] || last != mf[W-1]) begin
        failures++;
        $display("FAIL t=%0d mode=%0d sel=%h exp=%h flags=%h exp=%h", t, sel_mode, sel, es, flags, mf);
      end
      for (int w = 0; w < W; w++) if (upd[w]) mf[w] = nxt[w];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
