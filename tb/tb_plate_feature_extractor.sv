// tb_plate_feature_extractor: self-checking test of the edge feature block.
// Random grey images, some with vertical bars (plate-like strokes) and some
// flat, are loaded; the testbench applies the vertical-edge Sobel kernel and
// the threshold itself, counts edge pixels and checks the count, the mean
// and the variance (relative error 1e-6) and the (W-2)*(H-2)*7 + 3 clock
// duration.
module tb_plate_feature_extractor;
  import fp32_pkg::*;
  import tb_fp_pkg::*;

  localparam int W = 16, H = 8, T = 100;
  logic        clk = 1'b0, rst_n = 1'b1, we = 1'b0, start = 1'b0, busy, done;
  logic [15:0] addr = '0;
  logic [7:0]  data = '0;
  logic [31:0] cnt;
  fp32_t       mean, vr;
  int          img [H][W];
  int          checks = 0, failures = 0, cyc = 0;

  plate_feature_extractor #(.IMG_W(W), .IMG_H(H), .THRESH(T)) dut (
    .clk(clk), .rst_n(rst_n), .img_we(we), .img_addr(addr), .img_data(data), .start(start),
    .busy(busy), .done(done), .edge_count(cnt), .mean_o(mean), .var_o(vr));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 12; run++) begin
      int  ref_cnt, t0;
      real m, v;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          if (run % 3 == 0)      img[r][c] = 60;                                   // flat
          else if (run % 3 == 1) img[r][c] = ((c / 2) % 2 == 0) ? 220 : 20;        // bars
          else                   img[r][c] = $urandom_range(0, 255);
          @(negedge clk);
          we = 1'b1; addr = 16'(r * W + c); data = 8'(img[r][c]);
        end
      @(negedge clk) we = 1'b0;
      ref_cnt = 0;
      for (int r = 1; r < H - 1; r++)
        for (int c = 1; c < W - 1; c++) begin
          int g;
          g = img[r-1][c+1] - img[r-1][c-1] + 2 * (img[r][c+1] - img[r][c-1]) + img[r+1][c+1] - img[r+1][c-1];
          if (g < 0) g = -g;
          if (g > T) ref_cnt++;
        end
      m = real'(ref_cnt) / real'((W - 2) * (H - 2));
      v = m * (1.0 - m);
      start = 1'b1;
      t0 = cyc;
      @(negedge clk) start = 1'b0;
      while (!done) @(negedge clk);
      checks += 4;
      if (cyc - t0 != (W - 2) * (H - 2) * 7 + 3) begin
        failures++;
        $display("FAIL cycles %0d", cyc - t0);
      end
      if (cnt != 32'(ref_cnt)) begin
        failures++;
        $display("FAIL count %0d exp %0d", cnt, ref_cnt);
      end
      if (abs_r(to_real(mean) - m) > 1e-6 * m + 1e-9) failures++;
      if (abs_r(to_real(vr) - v) > 1e-6 * v + 1e-9) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
