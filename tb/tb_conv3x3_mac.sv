// tb_conv3x3_mac: self-checking testbench of the multiply-accumulate datapath.
//
// Drives conv3x3_mac at its default widths (8-bit pixels and weights, 24-bit
// accumulator, 32-bit bias) with a stream of windows: the extreme cases
// (all -128, all 127, mixed signs), random windows with random kernels, and
// biases that are small, large, and outside the 24-bit range in both
// directions (clamped). Windows arrive back to back and with random gaps, and
// the kernel changes from window to window. Each acc is checked against
// conv3x3_ref_pkg::ref_acc, and acc_valid must follow in_valid after exactly
// two clocks.
module tb_conv3x3_mac;
  import conv3x3_ref_pkg::*;

  localparam int IN_W = 8, COEF_W = 8, ACC_W = 24, BIAS_W = 32, N = 2000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [IN_W-1:0]   pix [3][3];
  logic signed [COEF_W-1:0] ker [3][3];
  logic signed [BIAS_W-1:0] bias = '0;
  logic acc_valid;
  logic signed [ACC_W-1:0] acc;

  int checks = 0, failures = 0, cycle = 0;
  int n_clamp = 0, n_b2b = 0, n_in = 0;
  longint exp_q[$];
  int     stamp_q[$];
  int     last_in = -10;

  conv3x3_mac dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: samples what the DUT samples on each rising edge.
  always @(posedge clk) begin
    cycle++;
    if (rst_n && acc_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected acc_valid at cycle %0d", cycle);
      end else begin
        longint e;
        int st;
        e  = exp_q.pop_front();
        st = stamp_q.pop_front();
        if (longint'(acc) != e) begin
          failures++;
          $display("acc=%0d expected %0d", acc, e);
        end
        checks++;
        if (cycle - st != 2) begin
          failures++;
          $display("latency %0d, expected 2", cycle - st);
        end
      end
    end
    if (rst_n && in_valid) begin
      longint p[9], k[9];
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          p[r*3+c] = longint'(pix[r][c]);
          k[r*3+c] = longint'(ker[r][c]);
        end
      exp_q.push_back(ref_acc(p, k, longint'(bias), ACC_W));
      stamp_q.push_back(cycle);
      if (longint'(bias) > 8388607 || longint'(bias) < -8388608) n_clamp++;
      if (last_in == cycle - 1) n_b2b++;
      last_in = cycle;
      n_in++;
    end
  end

  // mode 0: random, 1: all -128, 2: all 127 / -128 mixed, 3: small values
  task automatic apply(int mode, longint b);
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        case (mode)
          1: begin pix[r][c] <= -8'sd128; ker[r][c] <= -8'sd128; end
          2: begin pix[r][c] <= 8'sd127;  ker[r][c] <= -8'sd128; end
          3: begin
            pix[r][c] <= IN_W'($urandom_range(6) - 3);
            ker[r][c] <= COEF_W'($urandom_range(4) - 2);
          end
          default: begin
            pix[r][c] <= IN_W'($urandom);
            ker[r][c] <= COEF_W'($urandom);
          end
        endcase
      end
    bias     <= BIAS_W'(b);
    in_valid <= 1'b1;
    @(posedge clk);
  endtask

  task automatic idle(int n);
    if (n == 0) return;
    in_valid <= 1'b0;
    repeat (n) @(posedge clk);
  endtask

  initial begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        pix[r][c] = '0;
        ker[r][c] = '0;
      end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    apply(1, 0);
    apply(1, 8388607);          // sum would wrap past the 24-bit maximum
    apply(2, 0);
    apply(2, -8388608);
    apply(1, 64'sd3000000000);  // clamped to the 24-bit maximum
    apply(2, -64'sd3000000000); // clamped to the 24-bit minimum
    apply(3, 1);
    idle(2);
    for (int i = 0; i < N; i++) begin
      longint b;
      case ($urandom_range(3))
        0: b = 0;
        1: b = longint'($urandom_range(2000)) - 1000;
        2: b = sext(longint'($urandom), 32);
        default: b = sext(longint'($urandom), 24);
      endcase
      apply(int'($urandom_range(5) > 3 ? $urandom_range(3) : 0), b);
      if ($urandom_range(3) == 0) idle($urandom_range(3));
    end
    idle(6);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    checks++;
    if (n_clamp == 0 || n_b2b == 0) begin
      failures++;
      $display("a case was never exercised: clamp=%0d back-to-back=%0d", n_clamp, n_b2b);
    end
    $display("windows=%0d bias-clamped=%0d back-to-back=%0d", n_in, n_clamp, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
