// tb_lns_exhaustive: exhaustive accuracy check of the LNS adder/subtractor.
// Runs the accuracy sweep with a stride of 1, i.e. every distinct r in
// [-25, 0) for both addition and subtraction (2 x 25 x 2^23 cases), and
// requires every error to lie within +/-0.5 * 2^-23 (see tb_lns_addsub).
module tb_lns_exhaustive;
  tb_lns_addsub #(.STRIDE(1)) sweep ();

  // watchdog: the sweep finishes long before this
  initial begin
    #(longint'(70) * 8388608);
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
