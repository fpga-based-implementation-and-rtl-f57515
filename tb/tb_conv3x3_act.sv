// tb_conv3x3_act: self-checking testbench of the shift / ReLU / saturation stage.
//
// Drives conv3x3_act at its default widths with accumulator values that hit
// every case: negative (ReLU to 0), -1 (the shift keeps it negative), small
// positive values of both parities (shift truncation), the exact saturation
// boundary and values far above it, plus random values over the whole 24-bit
// range. Inputs are applied on random clocks with gaps. Each output is checked
// against conv3x3_ref_pkg::ref_act, and y_valid must follow acc_valid after
// exactly one clock.
module tb_conv3x3_act;
  import conv3x3_ref_pkg::*;

  localparam int ACC_W = 24, OUT_W = 8, SHIFT = 1, N = 2000;

  logic clk = 0, rst_n = 0;
  logic acc_valid = 0;
  logic signed [ACC_W-1:0] acc = '0;
  logic y_valid;
  logic signed [OUT_W-1:0] y;

  int checks = 0, failures = 0, cycle = 0;
  int n_relu = 0, n_sat = 0, n_pass = 0;
  longint exp_q[$];
  int     stamp_q[$];

  conv3x3_act dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: samples what the DUT samples on each rising edge. Outputs seen
  // at an edge were produced by the previous edge.
  always @(posedge clk) begin
    cycle++;
    if (rst_n && y_valid) begin
      longint e;
      int st;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected y_valid at cycle %0d", cycle);
      end else begin
        e  = exp_q.pop_front();
        st = stamp_q.pop_front();
        if (longint'(y) != e) begin
          failures++;
          $display("y=%0d expected %0d", y, e);
        end
        checks++;
        if (cycle - st != 1) begin
          failures++;
          $display("latency %0d, expected 1", cycle - st);
        end
      end
    end
    if (rst_n && acc_valid) begin
      longint a;
      a = longint'(acc);
      exp_q.push_back(ref_act(a, SHIFT, OUT_W));
      stamp_q.push_back(cycle);
      if (a < 0) n_relu++;
      else if ((a >>> SHIFT) > 127) n_sat++;
      else n_pass++;
    end
  end

  task automatic apply(longint a);
    acc       <= ACC_W'(a);
    acc_valid <= 1'b1;
    @(posedge clk);
  endtask

  task automatic idle(int n);
    if (n == 0) return;
    acc_valid <= 1'b0;
    repeat (n) @(posedge clk);
  endtask

  initial begin
    static longint dir[$] = '{0, 1, 2, 3, -1, -2, -3, 254, 255, 256, 257, 8388607,
                      -8388608, 100, 101, 1000, -1000};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    foreach (dir[i]) apply(dir[i]);
    for (int i = 0; i < N; i++) begin
      longint a;
      case ($urandom_range(3))
        0: a = longint'($urandom_range(600)) - 300;
        1: a = sext(longint'($urandom), ACC_W);
        default: a = longint'($urandom_range(300));
      endcase
      apply(a);
      if ($urandom_range(3) == 0) begin
        idle($urandom_range(3));
      end
    end
    idle(5);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d outputs missing", exp_q.size());
    end
    checks++;
    if (n_relu == 0 || n_sat == 0 || n_pass == 0) begin
      failures++;
      $display("a case was never exercised: relu=%0d sat=%0d pass=%0d", n_relu, n_sat, n_pass);
    end
    $display("cases: relu=%0d saturate=%0d in-range=%0d", n_relu, n_sat, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
