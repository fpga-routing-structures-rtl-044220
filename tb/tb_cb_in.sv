// tb_cb_in: input connection block, W = 16, I = 10, Fc = 0.5W. Checks that
// every pin can reach exactly Fc*W distinct tracks, and that with one switch
// on per pin each pin follows the chosen track (pin p, switch j reaches
// track (p + 2j) mod 16).
module tb_cb_in;
  localparam int unsigned W = 16, I = 10, FCW = 8;
  logic [W-1:0] track;
  logic [I*FCW-1:0] cfg;
  logic [I-1:0] pin;
  int checks = 0, failures = 0;

  cb_in #(.W(W), .I(I), .FCW(FCW)) dut (.track(track), .cfg(cfg), .pin(pin));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sel [I];
    // reach: with all switches on, which tracks move each pin
    cfg = '1;
    for (int p = 0; p < I; p++) begin
      int cnt;
      cnt = 0;
      for (int t = 0; t < W; t++) begin
        track = W'(1) << t; #1;
        if (pin[p]) cnt++;
      end
      checks++;
      if (cnt != FCW) begin failures++; $display("FAIL pin %0d reaches %0d tracks", p, cnt); end
    end
    // routing with one switch per pin
    for (int it = 0; it < 200; it++) begin
      cfg = '0;
      for (int p = 0; p < I; p++) begin
        sel[p] = $urandom_range(FCW - 1);
        cfg[p*FCW + sel[p]] = 1'b1;
      end
      track = W'($urandom);
      #1;
      for (int p = 0; p < I; p++) begin
        checks++;
        if (pin[p] !== track[(p + 2*sel[p]) % W]) begin
          failures++;
          $display("FAIL pin %0d sw %0d", p, sel[p]);
        end
      end
    end
    cfg = '0; track = '1; #1;
    checks++;
    if (pin !== '0) begin failures++; $display("FAIL open pins not 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
