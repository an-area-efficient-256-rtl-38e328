// tb_fft256_sdf: end-to-end test of the 256-point SDF FFT at its default
// parameters (12-bit data).
//
// Six frames are streamed back to back: a complex tone, an off-origin
// impulse, full-scale random data (continuous), full-scale random data with
// random input stalls, two tones, and a zero frame that flushes the
// pipeline. Each output X(k) is compared, component by component, with a
// double-precision DFT of the same input divided by 256; the tolerance
// allows for the truncating butterflies and the rounded 12-bit twiddle
// constants. The test also checks the output order (bit-reversed k, one
// frame after another), the latency (X(0) of the first frame 11 cycles
// after its last input sample) and that, without stalls, one result leaves
// per cycle. It counts how often each mechanism occurs (input stall, the
// -j rotation of every BF2 stage, every W16 exponent at both W16 stages,
// every quadrant and the mirrored half of the W256 multiplier) and fails
// if one never does.
module tb_fft256_sdf;

  localparam int N    = 256;
  localparam int W    = 12;
  localparam int NF   = 6;      // frames sent, the last one flushes
  localparam int NCHK = NF - 1; // frames whose results are checked
  localparam int TOL  = 6;      // LSBs per component
  localparam int LAT  = 11;     // register stages after the butterflies' D
  localparam real PI  = 3.14159265358979323846;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                in_valid = 1'b0;
  logic signed [W-1:0] in_re = '0, in_im = '0;
  logic                in_frame_start;
  logic                out_valid;
  logic [7:0]          out_pos, out_k;
  logic signed [W-1:0] out_re, out_im;

  fft256_sdf dut (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .in_frame_start,
    .out_valid, .out_pos, .out_k, .out_re, .out_im
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------------------------------------------------------- data
  int  xr [NF][N];
  int  xi [NF][N];
  real er [NCHK][N];
  real ei [NCHK][N];
  real ct [N], st [N];

  function automatic int clip(real v);
    int i;
    i = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
    if (i > 2047) i = 2047;
    if (i < -2048) i = -2048;
    return i;
  endfunction

  task automatic make_data();
    for (int n = 0; n < N; n++) begin
      ct[n] = $cos(2.0 * PI * n / N);
      st[n] = $sin(2.0 * PI * n / N);
    end
    for (int n = 0; n < N; n++) begin
      // 0: tone at bin 5
      xr[0][n] = clip(1500.0 * ct[(5 * n) % N]);
      xi[0][n] = clip(1500.0 * st[(5 * n) % N]);
      // 1: impulse at n = 3
      xr[1][n] = (n == 3) ? 2000 : 0;
      xi[1][n] = (n == 3) ? -1000 : 0;
      // 2, 3: full-scale random
      xr[2][n] = int'($urandom_range(4095)) - 2048;
      xi[2][n] = int'($urandom_range(4095)) - 2048;
      xr[3][n] = int'($urandom_range(4095)) - 2048;
      xi[3][n] = int'($urandom_range(4095)) - 2048;
      // 4: tones at bins 37 and 200
      xr[4][n] = clip(900.0 * ct[(37 * n) % N] + 700.0 * ct[(200 * n) % N]);
      xi[4][n] = clip(900.0 * st[(37 * n) % N] + 700.0 * st[(200 * n) % N]);
      // 5: flush
      xr[5][n] = 0;
      xi[5][n] = 0;
    end
    for (int f = 0; f < NCHK; f++)
      for (int k = 0; k < N; k++) begin
        real sr, si;
        sr = 0.0;
        si = 0.0;
        for (int n = 0; n < N; n++) begin
          int m;
          m = (n * k) % N;
          // x * exp(-j*2*pi*n*k/N)
          sr += xr[f][n] * ct[m] + xi[f][n] * st[m];
          si += xi[f][n] * ct[m] - xr[f][n] * st[m];
        end
        er[f][k] = sr / N;
        ei[f][k] = si / N;
      end
  endtask

  // ------------------------------------------------------------ stimulus
  int stalls = 0;
  int last_in_cycle_f0 = -1;

  initial begin
    make_data();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < NF; f++) begin
      for (int n = 0; n < N; n++) begin
        // frame 3 is sent with random gaps
        while (f == 3 && $urandom_range(3) == 0) begin
          @(posedge clk);
          in_valid <= 1'b0;
          stalls++;
        end
        @(posedge clk);
        in_valid <= 1'b1;
        in_re    <= W'(xr[f][n]);
        in_im    <= W'(xi[f][n]);
        if (f == 0 && n == N - 1) last_in_cycle_f0 = cycle + 1;
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (40) @(posedge clk);
    finish_test();
  end

  // --------------------------------------------------------- output check
  int   nout = 0;
  int   first_out_cycle = -1;
  int   maxerr = 0;
  int   gaps_without_stall = 0;
  int   prev_out_cycle = -1;

  always @(posedge clk) begin
    if (rst_n && out_valid && nout < NCHK * N) begin
      int f, k, dr, di;
      f = nout / N;
      k = int'(out_k);
      if (first_out_cycle < 0) first_out_cycle = cycle;
      // order: position counts through the frame, k is its bit reverse
      checks++;
      if (int'(out_pos) != nout % N || out_k != fft_pkg::bitrev8(out_pos)) begin
        failures++;
        $display("ORDER fail: output %0d pos %0d k %0d", nout, out_pos, out_k);
      end
      // throughput: continuous input gives one result per cycle (frames 0-1)
      if (nout > 0 && nout < 2 * N && cycle != prev_out_cycle + 1)
        gaps_without_stall++;
      prev_out_cycle = cycle;
      dr = int'(out_re) - $rtoi(er[f][k] >= 0 ? er[f][k] + 0.5 : er[f][k] - 0.5);
      di = int'(out_im) - $rtoi(ei[f][k] >= 0 ? ei[f][k] + 0.5 : ei[f][k] - 0.5);
      if (dr < 0) dr = -dr;
      if (di < 0) di = -di;
      if (dr > maxerr) maxerr = dr;
      if (di > maxerr) maxerr = di;
      checks++;
      if (dr > TOL || di > TOL) begin
        failures++;
        if (failures < 20)
          $display("VALUE fail: frame %0d k %0d got (%0d,%0d) expected (%0.2f,%0.2f)",
                   f, k, out_re, out_im, er[f][k], ei[f][k]);
      end
      nout++;
    end
  end

  // ------------------------------------------------- mechanism coverage
  int rot_cnt [4];
  int w16a [16], w16b [16];
  int quad_cnt [4];
  int mirror_cnt = 0;

  initial begin
    foreach (rot_cnt[i]) rot_cnt[i] = 0;
    foreach (quad_cnt[i]) quad_cnt[i] = 0;
    foreach (w16a[i]) begin w16a[i] = 0; w16b[i] = 0; end
  end

  always @(posedge clk) begin
    if (dut.g_stage[2].iv && dut.g_stage[2].u_bf.rot) rot_cnt[0]++;
    if (dut.g_stage[4].iv && dut.g_stage[4].u_bf.rot) rot_cnt[1]++;
    if (dut.g_stage[6].iv && dut.g_stage[6].u_bf.rot) rot_cnt[2]++;
    if (dut.g_stage[8].iv && dut.g_stage[8].u_bf.rot) rot_cnt[3]++;
    if (dut.v[2]) w16a[dut.g_tw[0].u_tw.g_w16.e]++;
    if (dut.v[6]) w16b[dut.g_tw[2].u_tw.g_w16.e]++;
    if (dut.v[4]) begin
      quad_cnt[dut.g_tw[1].u_tw.g_w256.u_mult.quad]++;
      if (dut.g_tw[1].u_tw.g_w256.u_mult.mirror) mirror_cnt++;
    end
  end

  task automatic seen(string what, int n);
    $display("  %-28s %0d", what, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("COVER fail: %s never happened", what);
    end
  endtask

  task automatic finish_test();
    int lat;
    // all results of the checked frames arrived
    checks++;
    if (nout != NCHK * N) begin
      failures++;
      $display("COUNT fail: %0d results, expected %0d", nout, NCHK * N);
    end
    // latency of the first result
    lat = first_out_cycle - last_in_cycle_f0;
    checks++;
    if (lat != LAT) begin
      failures++;
      $display("LATENCY fail: X(0) %0d cycles after last input, expected %0d", lat, LAT);
    end
    checks++;
    if (gaps_without_stall != 0) begin
      failures++;
      $display("RATE fail: %0d output gaps with continuous input", gaps_without_stall);
    end
    $display("max error %0d LSB, latency %0d cycles", maxerr, lat);
    $display("mechanisms:");
    seen("input stall cycles", stalls);
    seen("BF2 stage 2 -j", rot_cnt[0]);
    seen("BF2 stage 4 -j", rot_cnt[1]);
    seen("BF2 stage 6 -j", rot_cnt[2]);
    seen("BF2 stage 8 -j", rot_cnt[3]);
    foreach (w16a[e]) if (e inside {0, 1, 2, 3, 4, 6, 9}) begin
      seen($sformatf("W16 after stage 2, e=%0d", e), w16a[e]);
      seen($sformatf("W16 after stage 6, e=%0d", e), w16b[e]);
    end
    foreach (quad_cnt[q]) seen($sformatf("W256 quadrant %0d", q), quad_cnt[q]);
    seen("W256 mirrored exponent", mirror_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("WATCHDOG: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
