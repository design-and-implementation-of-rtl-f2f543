// Testbench of vc_encode: random images and random bits; each share pixel must be one black and one white sub-pixel in the order the random bit picks, share 2 must equal share 1 for white and be its complement for black, and stacking must give two black sub-pixels exactly for black pixels.
module tb_vc_encode;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  // Watchdog: a run that does not finish in time counts as a failure.
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 128;
  logic [N-1:0]   px, rnd;
  logic [2*N-1:0] s1, s2;
  vc_encode #(.N(N)) dut (.pixel_i(px), .rnd_i(rnd), .share1_o(s1), .share2_o(s2));

  initial begin
    for (int n = 0; n < 200; n++) begin
      px = rand128(); rnd = rand128();
      if (n == 0) px = '0;
      if (n == 1) px = '1;
      #1;
      for (int i = 0; i < N; i++) begin
        logic [1:0] a, b;
        a = s1[2*i +: 2]; b = s2[2*i +: 2];
        check(a == (rnd[i] ? 2'b01 : 2'b10), $sformatf("share1 pixel %0d = %b", i, a));
        check(px[i] ? (b == ~a) : (b == a), $sformatf("share2 pixel %0d = %b", i, b));
        check(((a | b) == 2'b11) == px[i], $sformatf("stacked pixel %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
