// tb_spike_queue: writes spikes of random length (some too short, some too
// long) into the queue until it is full, reads every head spike back sample by
// sample, checks data and tags against a model queue, pops, and repeats with
// reads and writes interleaved. Also checks in_ready, empty and 'dropped'.
module tb_spike_queue;
  import spline_pkg::*;

  localparam int N = 32, L = 45, CH_W = 7, LEN_W = 6;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 0, dropped, empty, rd_en = 0, pop = 0;
  logic signed [SAMPLE_W-1:0] in_sample = '0, rd_data;
  logic [LEN_W-1:0] in_align = '0, hd_len, hd_align, rd_idx = '0;
  logic [CH_W-1:0]  in_channel = '0, hd_channel;

  typedef struct { int len; int align; int ch; int s[$]; } spike_t;
  spike_t model [$];
  int checks = 0, failures = 0, n_full = 0, n_drop = 0;

  spike_queue #(.N_SPIKES(N), .MAX_LEN(L), .CH_W(CH_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Write one spike of n samples; returns 0 if the queue refused it.
  task automatic write_spike(input int n);
    spike_t sp;
    sp.align = $urandom_range(0, 44);
    sp.ch = $urandom_range(0, 127);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      in_valid = 1; in_sample = SAMPLE_W'($urandom); in_last = (k == n - 1);
      in_align = LEN_W'(sp.align); in_channel = CH_W'(sp.ch);
      if (k < L) sp.s.push_back(int'(in_sample));
      #1;
      check(in_ready, "in_ready low while writing a spike");
      if (k == n - 1) check(dropped == (n < 3), "dropped flag");
      @(posedge clk);
    end
    @(negedge clk); in_valid = 0; in_last = 0;
    sp.len = (n > L) ? L : n;
    if (n >= 3) model.push_back(sp); else n_drop++;
  endtask

  task automatic read_head();
    spike_t sp;
    sp = model.pop_front();
    @(negedge clk);
    check(!empty, "empty with spikes queued");
    check(int'(hd_len) == sp.len, "head length");
    check(int'(hd_align) == sp.align, "head align");
    check(int'(hd_channel) == sp.ch, "head channel");
    for (int k = sp.len - 1; k >= 0; k--) begin   // any order works
      rd_en = 1; rd_idx = LEN_W'(k);
      @(posedge clk); #1;
      check(int'(rd_data) == sp.s[k], $sformatf("sample %0d", k));
      @(negedge clk);
    end
    rd_en = 0;
    pop = 1;
    @(posedge clk); #1;
    @(negedge clk);
    pop = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && in_ready, "empty and ready after reset");
    write_spike(2);
    write_spike(1);
    check(empty, "short spikes are not queued");
    // fill the queue
    while (model.size() < N) write_spike($urandom_range(3, 50));
    @(negedge clk);
    check(!in_ready, "in_ready low when full");
    if (!in_ready) n_full++;
    // drain half, refill, drain everything
    repeat (N / 2) read_head();
    check(in_ready, "in_ready after pops");
    while (model.size() < N) write_spike($urandom_range(3, 45));
    while (model.size() > 0) read_head();
    @(negedge clk);
    check(empty, "empty after draining");
    check(n_full == 1 && n_drop == 2, "full and drop cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
