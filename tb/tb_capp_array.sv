// tb_capp_array: masked writes and searches on a 12-word array. Covers Exact
// words (EM=1), Masked words with stored don't-care bytes (EM=0), the search
// mask and the write-enable columns, against a word-level model.
module tb_capp_array;
  import space_pkg::*;
  import space_ref_pkg::*;
  localparam int W = 12;
  logic         clk = 0;
  word_t        key = '0, mr = '1, wr = '1;
  logic [W-1:0] wen = '0, match, em;
  word_t        rd [W];
  word_t        mm [W];
  int           checks = 0, failures = 0, n_dc = 0, n_exact_hit = 0;

  capp_array #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    wen = '1; wr = '1; key = '0;
    @(negedge clk);
    foreach (mm[w]) mm[w] = '0;
    for (int t = 0; t < 3000; t++) begin
      key = rand_word();
      mr  = rand_mask();
      wr  = rand_mask();
      wen = W'($urandom) & W'($urandom);
      #1;
      for (int w = 0; w < W; w++) begin
        bit dc;
        em[w] = word_match(mm[w], key, mr, dc);
        if (em[w] && dc) n_dc++;
        if (em[w] && mm[w][35]) n_exact_hit++;
      end
      checks++;
      if (match != em) begin
        failures++;
        $display("FAIL t=%0d key=%h mr=%h match=%h exp=%h", t, key, mr, match, em);
      end
      for (int w = 0; w < W; w++) if (wen[w]) mm[w] = (mm[w] & ~wr) | (key & wr);
      @(negedge clk);
      checks++;
      for (int w = 0; w < W; w++) if (rd[w] != mm[w]) begin
        failures++;
        $display("FAIL t=%0d word %0d = %h exp %h", t, w, rd[w], mm[w]);
        break;
      end
    end
    checks++;
    if (n_dc == 0 || n_exact_hit == 0) begin
      failures++;
      $display("FAIL coverage: stored-dc hits %0d, exact hits %0d", n_dc, n_exact_hit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
