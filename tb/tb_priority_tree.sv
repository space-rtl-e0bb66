// tb_priority_tree: random and sparse request vectors on a 148-input tree
// (radix 12), compared with a straight scan for the first request.
module tb_priority_tree;
  localparam int N = 148;
  logic         prq;
  logic [N-1:0] req, first, prior;
  logic         any;
  int           checks = 0, failures = 0;

  priority_tree #(.N(N), .RADIX(12)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [N-1:0] ef, ep;
      logic         seen;
      prq = ($urandom_range(0, 3) == 0);
      req = '0;
      case (t % 4)
        0: ;                                             // no request
        1: req[$urandom_range(0, N-1)] = 1'b1;           // one request
        2: for (int i = 0; i < 3; i++) req[$urandom_range(0, N-1)] = 1'b1;
        default: for (int i = 0; i < N; i++) req[i] = ($urandom_range(0, 7) == 0);
      endcase
      #1;
      seen = prq; ef = '0; ep = '0;
      for (int i = 0; i < N; i++) begin
        ep[i] = seen;
        ef[i] = req[i] && !seen;
        seen |= req[i];
      end
      checks++;
      if (first != ef || prior != ep || any != (|req)) begin
        failures++;
        $display("FAIL t=%0d prq=%0b req=%h first=%h exp=%h", t, prq, req, first, ef);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
