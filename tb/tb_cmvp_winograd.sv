// tb_cmvp_winograd -- end-to-end test of the full 8 x 8 multiplier at its
// default parameters (16-bit data and coefficients, built-in demonstration
// matrix).
//
// Streams vectors through the two-stage pipeline and checks every output
// against the direct product y_m = sum_n a_{m,n} x_n, worked out here from
// the matrix elements (no Winograd identity is used in the reference).  It
// also checks that each result appears exactly two cycles after its input.
// Mechanisms exercised and counted: back-to-back vectors (one per cycle),
// bubbles (in_valid low between vectors), a reset while vectors are in
// flight (which must drop them), and extreme data (all x = -2^15 or
// +2^15-1, the largest |y|).  A mechanism that never occurs counts a failure.
// A watchdog ends the run after a fixed number of cycles.
module tb_cmvp_winograd;
  localparam int M = 8, N = 8, DW = 16, CW = 16;
  localparam int Y_W = cmvp_pkg::y_w(DW, CW, N);
  localparam int LATENCY = 2;
  localparam logic [M*N*CW-1:0] A = (M*N*CW)'(cmvp_pkg::demo_matrix(M, N, CW));

  logic                  clk, rst_n, in_valid, out_valid;
  logic signed [DW-1:0]  x [N];
  logic signed [Y_W-1:0] y [M];

  cmvp_winograd dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
                     .out_valid(out_valid), .y(y));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  typedef struct {
    int     due;
    longint y [M];
  } exp_t;

  exp_t   q [$];
  int     cycle, checks, failures;
  int     n_vec = 0, n_b2b = 0, n_bubble = 0, n_flush = 0, n_extreme = 0;
  bit     prev_valid = 0, done = 0;

  function automatic longint a_of(input int m, input int n);
    return longint'($signed(A[(m * N + n) * CW +: CW]));
  endfunction

  // Output checker: runs just after every rising edge.
  always begin
    @(posedge clk);
    #1;
    cycle++;
    if (q.size() > 0 && q[0].due == cycle) begin
      checks++;
      if (!out_valid) begin
        failures++;
        $display("FAIL cycle %0d: expected out_valid", cycle);
      end else begin
        for (int m = 0; m < M; m++) begin
          checks++;
          if (longint'(y[m]) != q[0].y[m]) begin
            failures++;
            $display("FAIL cycle %0d m=%0d got %0d exp %0d", cycle, m, y[m], q[0].y[m]);
          end
        end
      end
      void'(q.pop_front());
    end else if (out_valid) begin
      checks++;
      failures++;
      $display("FAIL cycle %0d: unexpected out_valid", cycle);
    end
  end

  // Drive one input on the falling edge; v = 0 gives a bubble.
  task automatic drive(input bit v, input int kind);
    exp_t e;
    @(negedge clk);
    in_valid = v;
    for (int n = 0; n < N; n++)
      case (kind)
        1:       x[n] = 16'sh8000;
        2:       x[n] = 16'sh7FFF;
        3:       x[n] = (a_of(0, n) < 0) ? 16'sh8000 : 16'sh7FFF;
        default: x[n] = DW'($urandom);
      endcase
    if (v) begin
      n_vec++;
      if (prev_valid) n_b2b++; else if (n_vec > 1) n_bubble++;
      if (kind != 0) n_extreme++;
      e.due = cycle + LATENCY;
      for (int m = 0; m < M; m++) begin
        e.y[m] = 0;
        for (int n = 0; n < N; n++) e.y[m] += a_of(m, n) * longint'(x[n]);
      end
      q.push_back(e);
    end
    prev_valid = v;
  endtask

  initial begin
    cycle = 0; checks = 0; failures = 0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int n = 0; n < N; n++) x[n] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Extreme vectors, back to back.
    drive(1, 1); drive(1, 2); drive(1, 3);
    // Random stream with random bubbles.
    for (int i = 0; i < 400; i++) drive(($urandom % 4) != 0, 0);
    drive(0, 0); drive(0, 0); drive(0, 0);
    // Reset with two vectors in flight: they must be dropped.
    drive(1, 0); drive(1, 0);
    @(negedge clk);
    in_valid = 1'b0;
    rst_n = 1'b0;
    q.delete();
    n_flush++;
    @(negedge clk);
    rst_n = 1'b1;
    prev_valid = 0;
    // Stream again after the reset.
    for (int i = 0; i < 100; i++) drive(1, (i % 10 == 0) ? 3 : 0);
    drive(0, 0); drive(0, 0); drive(0, 0); drive(0, 0);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", q.size());
    end
    $display("mechanisms: vectors=%0d back_to_back=%0d bubbles=%0d resets_in_flight=%0d extreme=%0d",
             n_vec, n_b2b, n_bubble, n_flush, n_extreme);
    checks += 4;
    if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back vectors"); end
    if (n_bubble == 0)  begin failures++; $display("FAIL no bubbles"); end
    if (n_flush == 0)   begin failures++; $display("FAIL no reset in flight"); end
    if (n_extreme == 0) begin failures++; $display("FAIL no extreme vectors"); end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (5000) @(posedge clk);
    if (!done) begin
      failures++;
      $display("FAIL watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
