// tb_cb_out: output connection block, W = 16, N = 4, Fc = 0.5W. Output o,
// switch j drives track (o + 2j) mod 16; a track's drive is the OR of every
// output switched onto it.
module tb_cb_out;
  localparam int unsigned W = 16, N = 4, FCW = 8;
  logic [N-1:0] lb_out;
  logic [N*FCW-1:0] cfg;
  logic [W-1:0] drv;
  int checks = 0, failures = 0;

  cb_out #(.W(W), .N(N), .FCW(FCW)) dut (.lb_out(lb_out), .cfg(cfg), .drv(drv));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      logic [W-1:0] exp;
      cfg = (N*FCW)'({$urandom, $urandom});
      lb_out = N'($urandom);
      exp = '0;
      for (int o = 0; o < N; o++)
        for (int j = 0; j < FCW; j++)
          if (cfg[o*FCW + j] && lb_out[o]) exp[(o + 2*j) % W] = 1'b1;
      #1;
      checks++;
      if (drv !== exp) begin failures++; $display("FAIL drv=%h exp=%h", drv, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
