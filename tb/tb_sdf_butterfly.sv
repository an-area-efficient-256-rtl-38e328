// tb_sdf_butterfly: checks the SDF butterfly stage in three configurations:
// BF1 with a 4-word line, BF2 with a 4-word line and BF2 with a 1-word line
// (4-bit positions, so a frame is 16 samples). A shared random stream with
// random input stalls drives all three. A reference computed from the
// stored input stream gives every expected output:
//   first half of a 2D block:  (x[j] + v[j+D]) >> 1
//   second half:              (x[j] - v[j+D]) >> 1   (arithmetic shift)
// with v = -j*x for BF2 when position bits log2(D)+1 and log2(D) are both
// set, v = x otherwise. It also checks out_pos and the timing: output o
// appears the cycle after input o + D was accepted, and never otherwise.
module tb_sdf_butterfly;

  localparam int W  = 12;
  localparam int PW = 4;
  localparam int NS = 3;
  localparam int NIN = 800;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                in_valid = 1'b0;
  logic [PW-1:0]       in_pos = '0;
  logic signed [W-1:0] in_re = '0, in_im = '0;

  logic                o_v   [NS];
  logic [PW-1:0]       o_pos [NS];
  logic signed [W-1:0] o_re  [NS];
  logic signed [W-1:0] o_im  [NS];

  sdf_butterfly #(.D(4), .W(W), .PW(PW), .BTYPE(fft_pkg::BF1)) dut_bf1 (
    .clk, .rst_n, .in_valid, .in_pos, .in_re, .in_im,
    .out_valid(o_v[0]), .out_pos(o_pos[0]), .out_re(o_re[0]), .out_im(o_im[0]));
  sdf_butterfly #(.D(4), .W(W), .PW(PW), .BTYPE(fft_pkg::BF2)) dut_bf2 (
    .clk, .rst_n, .in_valid, .in_pos, .in_re, .in_im,
    .out_valid(o_v[1]), .out_pos(o_pos[1]), .out_re(o_re[1]), .out_im(o_im[1]));
  sdf_butterfly #(.D(1), .W(W), .PW(PW), .BTYPE(fft_pkg::BF2)) dut_bf2d1 (
    .clk, .rst_n, .in_valid, .in_pos, .in_re, .in_im,
    .out_valid(o_v[2]), .out_pos(o_pos[2]), .out_re(o_re[2]), .out_im(o_im[2]));

  int dd [NS] = '{4, 4, 1};
  bit b2 [NS] = '{1'b0, 1'b1, 1'b1};

  int xr [NIN], xi [NIN];
  int acc = 0;          // inputs accepted so far
  bit last_v = 1'b0;    // an input was accepted at the previous edge
  int nout [NS] = '{0, 0, 0};
  int rot_seen = 0;

  function automatic void expected(int s, int o, output int er, output int ei);
    int d, blk, j, t0, t1, vr, vi;
    d   = dd[s];
    blk = o / (2 * d);
    j   = o % (2 * d);
    t0  = blk * 2 * d + ((j < d) ? j : j - d);  // sample held in the line
    t1  = t0 + d;                               // its partner
    vr  = xr[t1];
    vi  = xi[t1];
    if (b2[s] && ((t1 >> ($clog2(d) + 1)) & 1) == 1) begin
      vr = xi[t1];
      vi = -xr[t1];
    end
    if (j < d) begin
      er = (xr[t0] + vr) >>> 1;
      ei = (xi[t0] + vi) >>> 1;
    end else begin
      er = (xr[t0] - vr) >>> 1;
      ei = (xi[t0] - vi) >>> 1;
    end
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < NS; s++) begin
        if (o_v[s]) begin
          int er, ei, o;
          o = nout[s];
          checks++;
          if (!last_v || acc - 1 != o + dd[s] || int'(o_pos[s]) != o % (1 << PW)) begin
            failures++;
            $display("stage %0d: output %0d at wrong time/pos (acc %0d pos %0d)",
                     s, o, acc, o_pos[s]);
          end
          expected(s, o, er, ei);
          checks++;
          if (int'(o_re[s]) != er || int'(o_im[s]) != ei) begin
            failures++;
            if (failures < 20)
              $display("stage %0d output %0d: got (%0d,%0d) expected (%0d,%0d)",
                       s, o, o_re[s], o_im[s], er, ei);
          end
          nout[s]++;
        end else if (last_v && acc - 1 >= dd[s]) begin
          checks++;
          failures++;
          $display("stage %0d: missing output after input %0d", s, acc - 1);
        end
      end
      if (in_valid && b2[1] && dut_bf2.rot) rot_seen++;
      last_v = in_valid;
      if (in_valid) acc++;
    end
  end

  initial begin
    for (int t = 0; t < NIN; t++) begin
      xr[t] = int'($urandom_range(4095)) - 2048;
      xi[t] = int'($urandom_range(4095)) - 2048;
    end
    // a few extreme corners
    xr[5] = -2048; xi[5] = -2048; xr[13] = 2047; xi[13] = -2048;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < NIN; t++) begin
      while ($urandom_range(4) == 0) begin
        @(posedge clk);
        in_valid <= 1'b0;
      end
      @(posedge clk);
      in_valid <= 1'b1;
      in_pos   <= PW'(t);
      in_re    <= W'(xr[t]);
      in_im    <= W'(xi[t]);
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (nout[s] != NIN - dd[s]) begin
        failures++;
        $display("stage %0d: %0d outputs, expected %0d", s, nout[s], NIN - dd[s]);
      end
    end
    checks++;
    if (rot_seen == 0) begin
      failures++;
      $display("BF2 -j never applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
