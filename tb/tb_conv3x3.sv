// tb_conv3x3: end-to-end self-checking testbench of the 3x3 convolution core.
//
// Runs conv3x3 with every parameter at its default and plays the role of the
// host: it holds 5x5 images, slides the 3x3 window over them (nine windows,
// row by row, giving a 3x3 output map) and feeds one window per clock.
//
// Part 1 is the reference case the core was specified with: a 5x5 image,
// every kernel row (1, 0, -1), bias 0, shift 1. Its output map must be
//     0 0 1
//     0 0 0
//     1 0 0
// and is checked against that fixed map as well as against the model.
// Two pixels of that image (row 4, columns 0 and 1) are not known; 3 and 0
// are used, which give the map above.
//
// Part 2 feeds random images with a new random kernel and bias for each
// image (the kernel changes at run time between windows), with windows back
// to back and with gaps. Every output is checked against
// conv3x3_ref_pkg (ref_acc then ref_act), and out_valid must follow in_valid
// after exactly three clocks. The testbench counts how often each mechanism
// happened (ReLU clamping, saturation, an odd sum truncated by the shift, a
// non-zero bias, a bias clamped to the accumulator range, a kernel change,
// back-to-back windows) and counts a failure for any that never did.
module tb_conv3x3;
  import conv3x3_ref_pkg::*;

  localparam int IMG = 5, OUTD = IMG - 2, N_IMG = 300;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [7:0]  pix [3][3];
  logic signed [7:0]  ker [3][3];
  logic signed [31:0] bias = '0;
  logic out_valid;
  logic signed [7:0]  y;

  int checks = 0, failures = 0, cycle = 0;
  int n_relu = 0, n_sat = 0, n_odd = 0, n_bias = 0, n_bclamp = 0;
  int n_kchange = 0, n_b2b = 0, n_win = 0;
  longint exp_q[$];
  int     stamp_q[$];
  int     last_in = -10;
  logic signed [7:0] last_ker [3][3];

  // Outputs of the reference case, in arrival order.
  logic signed [7:0] got_map [OUTD][OUTD];
  int    got_n = 0;
  logic  record = 0;

  logic signed [7:0] img [IMG][IMG];

  conv3x3 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: samples what the DUT samples on each rising edge.
  always @(posedge clk) begin
    cycle++;
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected out_valid at cycle %0d", cycle);
      end else begin
        longint e;
        int st;
        e  = exp_q.pop_front();
        st = stamp_q.pop_front();
        if (longint'(y) != e) begin
          failures++;
          $display("y=%0d expected %0d at cycle %0d", y, e, cycle);
        end
        checks++;
        if (cycle - st != 3) begin
          failures++;
          $display("latency %0d, expected 3", cycle - st);
        end
        if (record && got_n < OUTD*OUTD) begin
          got_map[got_n / OUTD][got_n % OUTD] = y;
          got_n++;
        end
      end
    end
    if (rst_n && in_valid) begin
      longint p[9], k[9], a, sh;
      logic changed;
      changed = 1'b0;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          p[r*3+c] = longint'(pix[r][c]);
          k[r*3+c] = longint'(ker[r][c]);
          if (ker[r][c] != last_ker[r][c]) changed = 1'b1;
          last_ker[r][c] = ker[r][c];
        end
      a  = ref_acc(p, k, longint'(bias), 24);
      sh = a >>> 1;
      exp_q.push_back(ref_act(a, 1, 8));
      stamp_q.push_back(cycle);
      if (sh < 0) n_relu++;
      if (sh > 127) n_sat++;
      if (a > 0 && a < 256 && (a % 2) == 1) n_odd++;
      if (bias != 0) n_bias++;
      if (longint'(bias) > 8388607 || longint'(bias) < -8388608) n_bclamp++;
      if (changed && n_win > 0) n_kchange++;
      if (last_in == cycle - 1) n_b2b++;
      last_in = cycle;
      n_win++;
    end
  end

  task automatic idle(int n);
    if (n == 0) return;
    in_valid <= 1'b0;
    repeat (n) @(posedge clk);
  endtask

  // Slide the window over img, row-major; random gaps if gaps is set.
  task automatic run_image(logic signed [7:0] k [3][3], longint b, bit gaps);
    for (int i = 0; i < OUTD; i++)
      for (int j = 0; j < OUTD; j++) begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            pix[r][c] <= img[i+r][j+c];
            ker[r][c] <= k[r][c];
          end
        bias     <= 32'(b);
        in_valid <= 1'b1;
        @(posedge clk);
        if (gaps && $urandom_range(3) == 0) idle($urandom_range(1, 3));
      end
  endtask

  initial begin
    // Reference image: Fig. 1 values; row 4, columns 0 and 1 chosen.
    static logic signed [7:0] ref_img [IMG][IMG] = '{
      '{8'hff, 8'h02, 8'h03, 8'h01, 8'hfe},
      '{8'h00, 8'h01, 8'hff, 8'h04, 8'h02},
      '{8'h02, 8'hfd, 8'h01, 8'h00, 8'h01},
      '{8'hfe, 8'h01, 8'h02, 8'hff, 8'h03},
      '{8'h03, 8'h00, 8'hfe, 8'h02, 8'hff}};
    static logic signed [7:0] ref_ker [3][3] = '{
      '{8'sd1, 8'sd0, -8'sd1},
      '{8'sd1, 8'sd0, -8'sd1},
      '{8'sd1, 8'sd0, -8'sd1}};
    static int ref_out [OUTD][OUTD] = '{'{0, 0, 1}, '{0, 0, 0}, '{1, 0, 0}};
    logic signed [7:0] k [3][3];
    longint b;

    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        pix[r][c] = '0;
        ker[r][c] = '0;
        last_ker[r][c] = '0;
      end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // Part 1: the reference case.
    img    = ref_img;
    record = 1'b1;
    run_image(ref_ker, 0, 1'b0);
    idle(5);
    record = 1'b0;
    checks++;
    if (got_n != OUTD*OUTD) begin
      failures++;
      $display("reference case: %0d outputs, expected %0d", got_n, OUTD*OUTD);
    end
    for (int i = 0; i < OUTD; i++)
      for (int j = 0; j < OUTD; j++) begin
        checks++;
        if (int'(got_map[i][j]) != ref_out[i][j]) begin
          failures++;
          $display("reference case: out[%0d][%0d]=%0d expected %0d",
                   i, j, got_map[i][j], ref_out[i][j]);
        end
      end
    $display("reference output map:");
    for (int i = 0; i < OUTD; i++)
      $display("  %0d %0d %0d", got_map[i][0], got_map[i][1], got_map[i][2]);

    // Part 2: random images, kernels and biases.
    for (int n = 0; n < N_IMG; n++) begin
      int mode;
      mode = int'($urandom_range(3));
      for (int r = 0; r < IMG; r++)
        for (int c = 0; c < IMG; c++)
          img[r][c] = (mode == 0) ? 8'($urandom) : 8'($urandom_range(16) - 8);
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          k[r][c] = (mode == 0) ? 8'($urandom) : 8'($urandom_range(6) - 3);
      case ($urandom_range(4))
        0: b = 0;
        1: b = longint'($urandom_range(200)) - 100;
        2: b = sext(longint'($urandom), 32);
        default: b = longint'($urandom_range(40)) - 20;
      endcase
      run_image(k, b, n % 2 == 1);
    end
    idle(6);

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d outputs missing", exp_q.size());
    end
    $display("windows=%0d relu=%0d saturate=%0d odd-shift=%0d bias=%0d bias-clamp=%0d kernel-change=%0d back-to-back=%0d",
             n_win, n_relu, n_sat, n_odd, n_bias, n_bclamp, n_kchange, n_b2b);
    checks++;
    if (n_relu == 0 || n_sat == 0 || n_odd == 0 || n_bias == 0 || n_bclamp == 0 ||
        n_kchange == 0 || n_b2b == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
