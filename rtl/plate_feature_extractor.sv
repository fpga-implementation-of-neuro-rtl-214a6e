// plate_feature_extractor: edge features of a candidate licence-plate region.
//
// A grey image of IMG_W x IMG_H 8-bit pixels is written into the image RAM
// through img_we/img_addr/img_data (row-major, address = row*IMG_W + col).
// After `start` each interior pixel is filtered with the Sobel kernel that
// responds to vertical edges,
//        [-1 0 1]
//   Gx = [-2 0 2] * image
//        [-1 0 1]
// and marked as an edge when |Gx| > THRESH, which gives a binary image. Two
// features of that binary image are produced in single precision float:
// its mean (the fraction of edge pixels) and its variance, mean*(1 - mean).
// The six neighbour pixels are read one per clock, so a pixel takes 7 clocks
// and the image (IMG_W-2)*(IMG_H-2)*7 + 3; `done` then holds until the next
// `start`. Filter, thresholding, mean and variance follow the source system;
// the image size, the threshold value, the kernel orientation and the serial
// schedule are this implementation's choices, and the third feature the
// source system uses (from a separate method) is not included.
module plate_feature_extractor
  import fp32_pkg::*;
#(
  parameter int unsigned IMG_W  = 128,
  parameter int unsigned IMG_H  = 32,
  parameter int unsigned THRESH = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        img_we,
  input  logic [15:0] img_addr,
  input  logic [7:0]  img_data,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic [31:0] edge_count,
  output fp32_t       mean_o,
  output fp32_t       var_o
);

  localparam int unsigned NPIX = (IMG_W - 2) * (IMG_H - 2);

  typedef enum logic [2:0] {IDLE, READ, EDGE, MEAN, VAR, DONE} state_e;
  state_e state;

  logic [15:0] row, col, base;     // base = row*IMG_W + col
  logic [2:0]  tap;                // neighbour being read, 0..5
  logic        tap_vld;
  logic [2:0]  tap_q;
  logic signed [12:0] gx;
  logic [7:0]  pix;
  logic        ram_en;
  logic [15:0] ram_addr;
  logic        loading;   // image RAM belongs to the loader while idle
  assign loading = state == IDLE || state == DONE;

  bram #(.WIDTH(8), .DEPTH(IMG_W * IMG_H), .AW(16)) u_img_ram (
    .clk(clk), .en(ram_en), .we(img_we && loading), .addr(ram_addr),
    .wdata(img_data), .rdata(pix));

  // taps: (row-1, col-1) (row-1, col+1) (row, col-1) (row, col+1) (row+1, col-1) (row+1, col+1)
  logic [15:0] tap_addr;
  always_comb begin
    unique case (tap)
      3'd0:    tap_addr = base - 16'(IMG_W) - 16'd1;
      3'd1:    tap_addr = base - 16'(IMG_W) + 16'd1;
      3'd2:    tap_addr = base - 16'd1;
      3'd3:    tap_addr = base + 16'd1;
      3'd4:    tap_addr = base + 16'(IMG_W) - 16'd1;
      default: tap_addr = base + 16'(IMG_W) + 16'd1;
    endcase
    ram_en   = loading ? img_we : (state == READ);
    ram_addr = loading ? img_addr : tap_addr;
  end

  // weight of a tap: left column negative, right column positive, middle row doubled
  function automatic logic signed [12:0] weighted(logic [2:0] t, logic [7:0] p);
    logic signed [12:0] v;
    v = (t == 3'd2 || t == 3'd3) ? 13'sd2 * $signed({5'd0, p}) : $signed({5'd0, p});
    return t[0] ? v : -v;
  endfunction

  fp32_t mean_q;
  logic signed [12:0] gx_next;
  assign gx_next = gx + weighted(tap_q, pix);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      row        <= 16'd1;
      col        <= 16'd1;
      base       <= 16'(IMG_W + 1);
      tap        <= '0;
      tap_vld    <= 1'b0;
      tap_q      <= '0;
      gx         <= '0;
      edge_count <= '0;
      mean_o     <= FP_ZERO;
      var_o      <= FP_ZERO;
      mean_q     <= FP_ZERO;
    end else begin
      tap_vld <= state == READ;
      tap_q   <= tap;
      if (tap_vld) gx <= gx_next;
      unique case (state)
        IDLE, DONE: if (start) begin
          row        <= 16'd1;
          col        <= 16'd1;
          base       <= 16'(IMG_W + 1);
          tap        <= '0;
          gx         <= '0;
          edge_count <= '0;
          state      <= READ;
        end
        READ: begin
          if (tap == 3'd5) state <= EDGE;
          else             tap   <= tap + 1'b1;
        end
        EDGE: begin
          // last tap's data is added in this clock
          if ((gx_next < 0 ? -gx_next : gx_next) > $signed(13'(THRESH)))
            edge_count <= edge_count + 1;
          gx  <= '0;
          tap <= '0;
          if (col == 16'(IMG_W - 2)) begin
            col  <= 16'd1;
            base <= base + 16'd3;
            if (row == 16'(IMG_H - 2)) state <= MEAN;
            else begin
              row   <= row + 1'b1;
              state <= READ;
            end
          end else begin
            col   <= col + 1'b1;
            base  <= base + 1'b1;
            state <= READ;
          end
        end
        MEAN: begin
          mean_q <= fp_div(fp_from_int(edge_count), fp_from_int(32'(NPIX)));
          state  <= VAR;
        end
        VAR: begin
          mean_o <= mean_q;
          var_o  <= fp_mul(mean_q, fp_sub(FP_ONE, mean_q));
          state  <= DONE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = state != IDLE && state != DONE;
  assign done = state == DONE;

endmodule
