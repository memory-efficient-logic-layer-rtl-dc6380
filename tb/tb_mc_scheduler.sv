// tb_mc_scheduler: self-checking unit test of the memory controller's scheduler.
//
// The scheduler is combinational. Each of 20000 trials draws random candidate, row-hit,
// bank, age and last-bank inputs (the candidate and hit masks are sparse, and half the trials
// use only two banks so that all three rules get exercised). A reference model in the
// testbench, written from the rule list, chooses independently:
//   1. the oldest row hit,
//   2. else the oldest request to a bank other than the last one,
//   3. else the oldest request;
// ties go to the lowest index. The choice, its rule and the valid flag are compared 1 ns after
// the inputs change. The run fails if any rule never decided. Watchdog: 1 ms of simulated time.
module tb_mc_scheduler;
  import ll_pkg::*;

  localparam int N = QUEUE_DEPTH, AGE_W = 4;

  logic [N-1:0]         cand, hit;
  logic [BANK_W-1:0]    bank [N];
  logic [AGE_W-1:0]     age  [N];
  logic                 last_bank_valid;
  logic [BANK_W-1:0]    last_bank;
  logic                 sel_valid;
  logic [$clog2(N)-1:0] sel;
  logic [1:0]           sel_class;

  mc_scheduler #(.N(N), .AGE_W(AGE_W)) dut (.*);

  int checks = 0, failures = 0;
  int used [3] = '{0, 0, 0};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // oldest entry of a mask, lowest index on ties; -1 if the mask is empty
  function automatic int oldest(logic [N-1:0] m);
    int best = -1;
    for (int i = 0; i < N; i++)
      if (m[i] && (best < 0 || age[i] > age[best])) best = i;
    return best;
  endfunction

  initial begin
    cand = '0; hit = '0; last_bank_valid = 1'b0; last_bank = '0;
    for (int i = 0; i < N; i++) begin bank[i] = '0; age[i] = '0; end
    for (int t = 0; t < 20000; t++) begin
      logic [N-1:0] m_hit, m_other;
      int           e_sel, e_cls;
      cand = N'($urandom) & N'($urandom);
      hit  = N'($urandom) & N'($urandom) & N'($urandom);
      last_bank_valid = ($urandom_range(0, 7) != 0);
      last_bank = BANK_W'($urandom);
      for (int i = 0; i < N; i++) begin
        bank[i] = (t % 2) ? BANK_W'($urandom_range(0, 1)) : BANK_W'($urandom);
        age[i]  = AGE_W'($urandom);
      end
      #1;
      m_hit = cand & hit;
      for (int i = 0; i < N; i++)
        m_other[i] = cand[i] && (!last_bank_valid || bank[i] != last_bank);
      e_sel = oldest(m_hit);
      e_cls = 0;
      if (e_sel < 0) begin e_sel = oldest(m_other); e_cls = 1; end
      if (e_sel < 0) begin e_sel = oldest(cand);    e_cls = 2; end
      check(sel_valid == (cand != '0), "valid exactly when some entry is a candidate");
      if (e_sel >= 0) begin
        check(int'(sel) == e_sel && int'(sel_class) == e_cls,
              $sformatf("trial %0d: picked %0d by rule %0d, expected %0d by rule %0d",
                        t, sel, sel_class, e_sel, e_cls));
        used[e_cls]++;
      end
    end
    check(used[0] > 0, "row-hit rule decided at least once");
    check(used[1] > 0, "bank-interleave rule decided at least once");
    check(used[2] > 0, "oldest-first rule decided at least once");
    $display("rule use: hit=%0d other-bank=%0d oldest=%0d", used[0], used[1], used[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
