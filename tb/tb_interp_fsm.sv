// tb_interp_fsm: runs the two-step controller against a model queue and a
// model decision unit, for random spike lengths, alignment indices and
// up/down-sampling factors. It checks
//  - that every operation sees the right window: the indices of the samples
//    shifted into the window model (one cycle after each read) must be the
//    clamped indices seg-2 .. seg+3 of the operation's segment;
//  - that step 1 evaluates exactly the up-sampled points of the two segments
//    around the original alignment point, and step 2 exactly the points
//    P mod S + kS below the last sample, with first/last/align flags;
//  - the cycle count: 1 + 6 + 2U + 6 + max(1, evaluations) per segment when
//    the decision arrives in time (381 cycles for 45 samples, U = 8, D = 1);
//  - that nothing is issued while the queue is empty.
module tb_interp_fsm;
  import spline_pkg::*;

  localparam int LEN_W = 6;

  logic clk = 0, rst_n = 0;
  logic [1:0] cfg_up_log = 0, cfg_dn_log = 0;
  logic q_empty = 1, rd_en, pop, dec_start, dec_done = 0, win_shift, op_valid, busy;
  logic [LEN_W-1:0] hd_len = 3, hd_align = 1, rd_idx;
  logic [POS_W-1:0] dec_default_pos, dec_pos = '0;
  op_tag_t op_tag;
  int checks = 0, failures = 0, cyc = 0;

  interp_fsm #(.MAX_LEN(45)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  // window model: indices of the samples in the window
  int widx [6];
  int rd_q = -1;
  int L, A, U, S, extra_delay;
  int ops1 [$], ops2 [$];
  bit f_first [$], f_last [$], f_align [$];
  int last1_cyc = -1;
  int n_wait = 0, n_emptyseg = 0;

  function automatic int clampi(input int x);
    return x < 0 ? 0 : (x > L - 1 ? L - 1 : x);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (op_valid) begin
        int seg;
        seg = int'(op_tag.pos) >> 3;
        for (int k = 0; k < 6; k++)
          check(widx[k] == clampi(seg - 2 + k), $sformatf("window index %0d for segment %0d", k, seg));
        check(int'(op_tag.t) == (int'(op_tag.pos) & 7), "t matches position");
        if (op_tag.step1) begin
          ops1.push_back(int'(op_tag.pos));
          if (op_tag.step_last) last1_cyc = cyc;
        end else begin
          ops2.push_back(int'(op_tag.pos));
          f_first.push_back(op_tag.first);
          f_last.push_back(op_tag.step_last);
          f_align.push_back(op_tag.align);
        end
      end
      if (win_shift) begin
        for (int k = 0; k < 5; k++) widx[k] = widx[k+1];
        widx[5] = rd_q;
      end
      rd_q = rd_en ? int'(rd_idx) : -1;
      if (rd_en) check(int'(rd_idx) < L, "read inside the spike");
    end
  end

  // model decision unit: answers 4 cycles after the last step-1 operation
  // (as the real pipeline does), sometimes later
  always @(posedge clk) begin
    if (dec_start) dec_done <= 0;
    else if (last1_cyc >= 0 && cyc == last1_cyc + 4 + extra_delay) begin
      dec_done <= 1;
      dec_pos  <= POS_W'(ops1[$urandom_range(0, ops1.size() - 1)]);
    end
  end

  initial begin
    int t0, t_pop, exp_cyc, segs, P, p0, n_exp, k;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) begin
      @(negedge clk);
      check(!rd_en && !op_valid && !busy, "idle while the queue is empty");
    end
    for (int it = 0; it < 300; it++) begin
      L = (it == 0) ? 45 : $urandom_range(3, 45);
      A = (it == 0) ? 20 : $urandom_range(0, 50);
      U = (it == 0) ? 8 : 1 << $urandom_range(1, 3);
      cfg_up_log = 2'($clog2(U));
      cfg_dn_log = (it == 0) ? 2'd0 : 2'($urandom_range(0, 3));
      S = (8 / U) << cfg_dn_log;
      extra_delay = (it % 4 == 3) ? $urandom_range(1, 10) : 0;
      ops1.delete(); ops2.delete(); f_first.delete(); f_last.delete(); f_align.delete();
      last1_cyc = -1;
      @(negedge clk);
      hd_len = LEN_W'(L); hd_align = LEN_W'(A); q_empty = 0;
      t0 = cyc;
      @(posedge clk);
      #1;
      q_empty = 1;     // one spike only: the FSM must not look again before pop
      while (!pop) begin
        @(negedge clk);
        if (!pop) @(posedge clk);
      end
      t_pop = cyc;
      repeat (3) @(posedge clk);   // let the last operations leave
      #1;
      // expected step 1
      if (A < 1) A = 1;
      if (A > L - 2) A = L - 2;
      check(ops1.size() == 2 * U, $sformatf("step-1 count %0d", ops1.size()));
      for (int j = 0; j < ops1.size(); j++)
        check(ops1[j] == 8 * (A - 1) + j * (8 / U), "step-1 position");
      // expected step 2
      P = int'(dec_pos);
      p0 = P % S;
      n_exp = 0;
      segs = 0;
      for (int p = p0; p < 8 * (L - 1); p += S) n_exp++;
      check(ops2.size() == n_exp, $sformatf("step-2 count %0d expected %0d", ops2.size(), n_exp));
      k = 0;
      foreach (ops2[j]) begin
        check(ops2[j] == p0 + j * S, "step-2 position");
        check(f_first[j] == (j == 0), "first flag");
        check(f_last[j] == (j == ops2.size() - 1), "last flag");
        check(f_align[j] == (ops2[j] == P), "align flag");
        if (ops2[j] == P) k++;
      end
      check(k == 1, "alignment point among the outputs");
      // cycle count: 1 + 6 + 2U + 6 + step-2 cycles (segments until done)
      segs = 0;
      for (int s = 0; s < L - 1; s++) begin
        int n_in;
        n_in = 0;
        for (int p = p0; p < 8 * (L - 1); p += S) if ((p >> 3) == s) n_in++;
        if (8 * s > p0 + (n_exp - 1) * S) break;
        if (n_in == 0) n_emptyseg++;
        segs += (n_in == 0) ? 1 : n_in;
      end
      exp_cyc = 1 + 6 + 2 * U + 6 + segs - 1;
      if (extra_delay == 0) begin
        check(t_pop - t0 == exp_cyc, $sformatf("cycles %0d expected %0d", t_pop - t0, exp_cyc));
        if (it == 0) check(t_pop - t0 + 1 <= 385, "worst case within 1 MHz / 2600 spikes/s");
      end else begin
        n_wait++;
      end
    end
    check(n_wait > 0 && n_emptyseg > 0, "wait and empty-segment cases exercised");
    $display("waits %0d, empty segments %0d", n_wait, n_emptyseg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
