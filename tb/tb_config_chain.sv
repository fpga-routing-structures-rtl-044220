// tb_config_chain: shifts a random pattern into two chained configuration
// registers and checks the parallel contents, the hold behaviour with
// shift_en low, the serial read-back and reset.
module tb_config_chain;
  localparam int unsigned WIDTH = 37;
  logic clk = 0, rst_n = 0, en = 0, sin = 0;
  logic s_mid, sout;
  logic [WIDTH-1:0] q0, q1;
  logic [2*WIDTH-1:0] pat;
  int checks = 0, failures = 0;

  config_chain #(.WIDTH(WIDTH)) c0 (.clk(clk), .rst_n(rst_n), .shift_en(en), .sin(sin), .sout(s_mid), .q(q0));
  config_chain #(.WIDTH(WIDTH)) c1 (.clk(clk), .rst_n(rst_n), .shift_en(en), .sin(s_mid), .sout(sout), .q(q1));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2*WIDTH; i++) pat[i] = 1'($urandom);
    #12 rst_n = 1;
    checks++;
    if (q0 !== '0 || q1 !== '0) begin failures++; $display("FAIL reset"); end
    // bit pat[i] for the far register (c1) first: pat[0..W-1] -> q1, then q0
    for (int i = 0; i < 2*WIDTH; i++) begin
      @(negedge clk); en = 1; sin = pat[i];
    end
    @(negedge clk); en = 0;
    checks++;
    if (q1 !== pat[WIDTH-1:0]) begin failures++; $display("FAIL far q1=%h", q1); end
    checks++;
    if (q0 !== pat[2*WIDTH-1:WIDTH]) begin failures++; $display("FAIL near q0=%h", q0); end
    // hold
    repeat (5) @(negedge clk);
    checks++;
    if (q1 !== pat[WIDTH-1:0] || q0 !== pat[2*WIDTH-1:WIDTH]) begin failures++; $display("FAIL hold"); end
    // read back serially: the first bit shifted in comes out first
    for (int i = 0; i < 2*WIDTH; i++) begin
      checks++;
      if (sout !== pat[i]) begin failures++; $display("FAIL readback %0d", i); end
      @(negedge clk); en = 1; sin = 0;
      @(posedge clk); #1; en = 0;
    end
    rst_n = 0; #1;
    checks++;
    if (q0 !== '0 || q1 !== '0) begin failures++; $display("FAIL reset 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
