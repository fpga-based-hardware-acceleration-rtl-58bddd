// tb_mlp_mandelbrot: the plotting workload of the original design on the
// engine at its default size: one inference per pixel of a 100 x 100 image
// of the plane window -2..1 (x) by -1.5..1.5 (y), the window in which the
// Mandelbrot set is drawn, 10,000 inferences in all.
//
// The trained weights of the original network are not available, so the
// weights are random float32 values (as in tb_mlp_graph); every output is
// compared bit for bit with the reference model of the network, every
// inference must take the same number of cycles, and the run reports the
// cycles per prediction. Each pixel is fed in the cycle the engine becomes
// ready, so the total cycle count is pixels x latency.
module tb_mlp_mandelbrot;
  import fp_ref_pkg::*;

  localparam int N_IN = 2, N_H1 = 50, N_H2 = 43, N_OUT = 1, LANES = 8;
  localparam int C1 = N_IN + 1, C2 = N_IN + N_H1 + 1, C3 = N_H2 + 1;
  localparam int G1 = (N_H1 + LANES - 1) / LANES;
  localparam int G2 = (N_H2 + LANES - 1) / LANES;
  localparam int G3 = (N_OUT + LANES - 1) / LANES;
  localparam int B2 = G1 * C1, B3 = B2 + G2 * C2, WORDS = B3 + G3 * C3;
  localparam int DEPTH = 1024;
  localparam int N_SAMPLES = 100 * 100;

  logic                   clk = 1'b0, rst_n = 1'b0;
  logic                   wl_we = 1'b0;
  logic [9:0]             wl_addr = '0;
  logic [LANES-1:0][31:0] wl_data = '0;
  logic                   in_valid = 1'b0, in_ready, out_valid;
  logic [31:0]            in_vec [N_IN];
  logic [31:0]            out_vec [N_OUT];

  logic [LANES-1:0][31:0] wimg [WORDS];

  int checks = 0, failures = 0;
  int n_pad = 0, n_skip = 0, n_sat_lo = 0, n_sat_hi = 0, n_b2b = 0;
  int cycle = 0;

  mlp_graph dut (.clk, .rst_n, .wl_we, .wl_addr, .wl_data,
                 .in_valid, .in_ready, .in_vec, .out_valid, .out_vec);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Mechanism counters, observed inside the engine: a layer whose last row
  // group ends before the last lane (zero-padded rows skipped), and a
  // completed skip-connection shift.
  always @(posedge clk) begin
    if (dut.mv_done && dut.u_matvec.lane != 3'(LANES - 1)) n_pad++;
    if (dut.sk_done) n_skip++;
  end

  initial begin : watchdog
    repeat (N_SAMPLES * 700 + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rnd_weight(real scale);
    return r2f(scale * (real'($urandom % 20001) - 10000.0) / 10000.0);
  endfunction

  // One layer of the reference: rows r of the word block at `base`.
  function automatic logic [31:0] ref_sig(logic [31:0] v);
    int k;
    k = ref_sigmoid_index(v, DEPTH, -7.5, 7.5);
    if (k == 0) n_sat_lo++;
    if (k == DEPTH - 1) n_sat_hi++;
    return ref_sigmoid_entry(k, DEPTH, -7.5, 7.5);
  endfunction

  function automatic logic [31:0] ref_dot(int base, int cols, int r, logic [31:0] v [64]);
    logic [31:0] acc;
    acc = 32'h0;
    for (int j = 0; j < cols; j++)
      acc = ref_add(acc, ref_mul(wimg[base + (r / LANES) * cols + j][r % LANES],
                                 (j == 0) ? 32'h3f80_0000 : v[j - 1]));
    return acc;
  endfunction

  function automatic logic [31:0] ref_net(logic [31:0] x, logic [31:0] y);
    logic [31:0] v1 [64], v2 [64], v3 [64];
    for (int i = 0; i < 64; i++) begin v1[i] = '0; v2[i] = '0; v3[i] = '0; end
    v1[0] = x; v1[1] = y;
    v2[0] = x; v2[1] = y;
    for (int r = 0; r < N_H1; r++) v2[N_IN + r] = ref_sig(ref_dot(0, C1, r, v1));
    for (int r = 0; r < N_H2; r++) v3[r] = ref_sig(ref_dot(B2, C2, r, v2));
    return ref_sig(ref_dot(B3, C3, 0, v3));
  endfunction

  // Kernel timings: loading N_IN inputs, three matvec layers, three sigmoid
  // pipeline flushes, the skip kernel and the output cycle.
  function automatic int mv_cycles(int cols, int rows);
    int s = 0;
    for (int r = 0; r < rows; r += LANES) s += cols + 1 + ((rows - r) < LANES ? rows - r : LANES);
    return s;
  endfunction
  localparam int SKIP_CYC = N_H1 + 1 + N_IN;

  logic [31:0] xs [N_SAMPLES], ys [N_SAMPLES];

  initial begin
    int expect_lat, lat, t_acc, sent, recv, t_first;
    expect_lat = N_IN + 1 + mv_cycles(C1, N_H1) + 4 + SKIP_CYC + 1
               + mv_cycles(C2, N_H2) + 4 + mv_cycles(C3, N_OUT) + 4 + 1;
    for (int i = 0; i < N_IN; i++) in_vec[i] = '0;

    // Weights: wide first layer (saturates often), narrower later layers.
    for (int w = 0; w < WORDS; w++)
      for (int l = 0; l < LANES; l++) begin
        int rowg;
        if (w < B2)      begin rowg = (w / C1) * LANES + l; wimg[w][l] = (rowg < N_H1) ? rnd_weight(6.0) : 32'h0; end
        else if (w < B3) begin rowg = ((w - B2) / C2) * LANES + l; wimg[w][l] = (rowg < N_H2) ? rnd_weight(0.6) : 32'h0; end
        else             begin rowg = l; wimg[w][l] = (rowg < N_OUT) ? rnd_weight(3.0) : 32'h0; end
      end

    // Pixel (col, row): x = -2 + 3*col/99, y = -1.5 + 3*row/99.
    for (int s = 0; s < N_SAMPLES; s++) begin
      xs[s] = r2f(-2.0 + 3.0 * real'(s % 100) / 99.0);
      ys[s] = r2f(-1.5 + 3.0 * real'(s / 100) / 99.0);
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      wl_we = 1'b1; wl_addr = 10'(w); wl_data = wimg[w];
    end
    @(negedge clk);
    wl_we = 1'b0;

    sent = 0; recv = 0; t_acc = 0;
    // Everything is sampled at the falling edge; a sample is held on the
    // input until taken, so the next one is taken in the very cycle the
    // engine becomes ready again.
    while (recv < N_SAMPLES) begin
      logic taken;
      @(negedge clk);
      taken = 1'b0;
      if (out_valid) begin
        logic [31:0] e;
        lat = cycle - t_acc;
        checks++;
        if (lat != expect_lat) begin
          failures++;
          $display("sample %0d: latency %0d cycles, expected %0d", recv, lat, expect_lat);
        end
        e = ref_net(xs[recv], ys[recv]);
        checks++;
        if (out_vec[0] !== e) begin
          failures++;
          $display("sample %0d (%h, %h): got %h expected %h", recv, xs[recv], ys[recv], out_vec[0], e);
        end
        recv++;
      end
      if (!in_valid && sent < N_SAMPLES) begin
        in_valid  = 1'b1;
        in_vec[0] = xs[sent];
        in_vec[1] = ys[sent];
      end
      if (in_valid && in_ready) begin
        if (out_valid) n_b2b++;
        t_acc = cycle;
        if (sent == 0) t_first = cycle;
        sent++;
        taken = 1'b1;
      end
      if (taken) begin
        @(posedge clk);
        #1 in_valid = 1'b0;
      end
    end

    $display("%0d pixels in %0d cycles, %0d cycles per prediction",
             N_SAMPLES, cycle - t_first, (cycle - t_first) / N_SAMPLES);
    $display("latency %0d cycles; padded layers %0d skip %0d sat_lo %0d sat_hi %0d back-to-back %0d",
             expect_lat, n_pad, n_skip, n_sat_lo, n_sat_hi, n_b2b);
    checks += 5;
    if (n_pad == 0)    failures++;
    if (n_skip == 0)   failures++;
    if (n_sat_lo == 0) failures++;
    if (n_sat_hi == 0) failures++;
    if (n_b2b == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
