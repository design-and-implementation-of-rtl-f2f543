// Testbench of vc_decode: shares built by the testbench from random images must stack back to the image with no error flag; a share pixel with two equal sub-pixels must raise the flag.
module tb_vc_decode;
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
  logic [N-1:0]   px, img;
  logic [2*N-1:0] s1, s2;
  logic           bad;
  vc_decode #(.N(N)) dut (.share1_i(s1), .share2_i(s2), .pixel_o(img), .bad_o(bad));

  initial begin
    for (int n = 0; n < 300; n++) begin
      px = rand128();
      for (int i = 0; i < N; i++) begin
        s1[2*i +: 2] = ($urandom_range(1) != 0) ? 2'b01 : 2'b10;
        s2[2*i +: 2] = px[i] ? ~s1[2*i +: 2] : s1[2*i +: 2];
      end
      #1;
      check(img == px, $sformatf("image %h decoded as %h", px, img));
      check(!bad, "well-formed shares flagged");
      if (n % 3 == 0) begin
        automatic int k = $urandom_range(N - 1);
        if (n % 2 == 0) s1[2*k +: 2] = 2'b11; else s2[2*k +: 2] = 2'b00;
        #1;
        check(bad, $sformatf("malformed pixel %0d not flagged", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
