// tb_bram: self-checking test of the single-port RAM. Random writes and
// reads against a shadow array; read data must appear one clock after the
// read request and must not change when `en` is low.
module tb_bram;
  localparam int DEPTH = 64;
  logic        clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [15:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] shadow [DEPTH];
  logic        written [DEPTH];
  int          checks = 0, failures = 0;

  bram #(.DEPTH(DEPTH)) dut (.clk(clk), .en(en), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) written[i] = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      addr = 16'(a);
      en   = 1'b1;
      we   = ($urandom_range(0, 1) == 1) || !written[a];
      if (we) begin
        wdata      = $urandom;
        shadow[a]  = wdata;
        written[a] = 1'b1;
        @(negedge clk);
        en = 1'b0;
      end else begin
        @(negedge clk);
        en = 1'b0;
        checks++;
        if (rdata != shadow[a]) failures++;
        @(negedge clk);
        checks++;
        if (rdata != shadow[a]) failures++;  // held while idle
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
