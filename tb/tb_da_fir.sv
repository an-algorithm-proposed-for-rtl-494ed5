// tb_da_fir: end-to-end check of the distributed-arithmetic filter against
// a direct-form convolution y[n] = sum h[k] x[n-k] computed here with the
// coefficient table written out by hand. Stimulus: a unit impulse (the
// output must reproduce the coefficients), a full-scale negative impulse
// (-128, exercising the sign-bit plane), extreme values, and random samples
// offered with random gaps. Checks out_y, out_y_norm (= out_y >>> 3), the
// latency of IN_W+1 cycles and the throughput of one sample per IN_W+1
// cycles.
module tb_da_fir;
  localparam int NTAPS = 81;
  localparam int IN_W  = fir_pkg::IN_W;
  localparam int ACC_W = fir_pkg::ACC_W;
  localparam int HALF_TAB [41] = '{
     5, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 0,
     0, 0,-1,-1,-1,-2,-2,-1,-1, 0, 0, 1, 3, 4, 5, 6, 7, 8, 8, 8 };

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic signed [IN_W-1:0] in_sample = '0;
  logic signed [ACC_W-1:0] out_y;
  logic signed [ACC_W-4:0] out_y_norm;
  int h [NTAPS];
  int hist [NTAPS];
  int expq [$];
  int checks = 0, failures = 0, accepted = 0, cyc = 0, produced = 0;
  int accept_cyc [$];

  da_fir dut (.clk, .rst_n, .in_valid, .in_ready, .in_sample, .out_valid, .out_y, .out_y_norm);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && in_ready) begin
      int y;
      y = 0;
      for (int k = NTAPS-1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(in_sample);
      for (int k = 0; k < NTAPS; k++) y += h[k] * hist[k];
      expq.push_back(y);
      accept_cyc.push_back(cyc);
      accepted++;
    end
    if (out_valid) begin
      int want, ac;
      produced++;
      checks += 3;
      if (expq.size() == 0) begin failures += 3; end
      else begin
        want = expq.pop_front();
        ac   = accept_cyc.pop_front();
        if (int'(out_y) != want) begin
          failures++;
          if (failures < 10) $display("sample %0d: got %0d want %0d", produced, out_y, want);
        end
        if (int'(out_y_norm) != (want >>> 3)) failures++;
        if (cyc - ac != IN_W + 1) begin
          failures++;
          if (failures < 10) $display("latency %0d", cyc - ac);
        end
      end
    end
  end

  task automatic send(int v);
    @(negedge clk);
    in_valid = 1; in_sample = IN_W'(v);
    do @(posedge clk); while (!in_ready);
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    int c0;
    for (int k = 0; k < 41; k++) begin h[k] = HALF_TAB[k]; h[80-k] = HALF_TAB[k]; end
    for (int k = 0; k < NTAPS; k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    send(1);
    repeat (NTAPS + 5) send(0);
    send(-128);
    repeat (NTAPS + 5) send(0);
    repeat (100) send(-128);
    repeat (100) send(127);
    // back-to-back throughput
    @(negedge clk);
    c0 = accepted;
    in_valid = 1;
    for (int t = 0; t < 50 * (IN_W + 1); t++) begin
      in_sample = IN_W'($urandom);
      @(negedge clk);
    end
    in_valid = 0;
    checks++;
    if (accepted - c0 != 50) begin
      failures++;
      $display("throughput: %0d samples in %0d cycles", accepted - c0, 50 * (IN_W + 1));
    end
    for (int t = 0; t < 1500; t++) begin
      if ($urandom_range(3) == 0) repeat ($urandom_range(5)) @(negedge clk);
      send($urandom_range(255) - 128);
    end
    repeat (3 * IN_W) @(negedge clk);
    checks++;
    if (produced != accepted) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
