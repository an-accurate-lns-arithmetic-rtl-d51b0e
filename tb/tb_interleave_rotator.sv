// tb_interleave_rotator: checks that the rotator returns entries rot .. rot + K
// of a P + K entry word, for random words and every rotation.
module tb_interleave_rotator;
  localparam int P = 8, K = 2, W = 31;
  logic [P+K-1:0][W-1:0] word;
  logic [$clog2(P)-1:0]  rot;
  logic [K:0][W-1:0]     out;
  int checks = 0, failures = 0;

  interleave_rotator #(.P(P), .K(K), .W(W)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int e = 0; e < P + K; e++) word[e] = W'($urandom);
      for (int r = 0; r < P; r++) begin
        rot = r[$clog2(P)-1:0];
        #1;
        for (int m = 0; m <= K; m++) begin
          checks++;
          if (out[m] !== word[r + m]) begin
            failures++;
            $display("rot=%0d m=%0d got %h exp %h", r, m, out[m], word[r + m]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
