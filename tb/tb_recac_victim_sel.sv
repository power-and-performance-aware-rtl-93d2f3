// tb_recac_victim_sel: self-checking test of the quota-enforcing victim
// selection.
//
// Builds random 16-way sets (random valid bits, owners and a random LRU
// permutation) and random quotas, and compares the chosen way with a
// reference written as the priority list: own LRU line when the core is at
// or over its quota, else the first invalid line, else the LRU line of a
// core over its quota, else the LRU line of the set; monitoring sets use the
// first invalid line, else the LRU line. A directed case reproduces the
// two-ways-per-core example of a phase change.
module tb_recac_victim_sel;
  localparam int N = 2, A = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [A-1:0] valid;
  logic [0:0]   owner [A];
  logic [3:0]   lru   [A];
  logic [0:0]   core;
  logic [4:0]   quota [N];
  logic         mon_set;
  logic [3:0]   victim;

  int checks = 0, failures = 0;
  int cnt_mon = 0, cnt_own = 0, cnt_inv = 0, cnt_over = 0, cnt_any = 0;

  recac_victim_sel #(.N(N), .A(A)) dut (.*);

  function automatic int ref_victim();
    int cnt[N];
    int best, bpos;
    cnt = '{default: 0};
    for (int w = 0; w < A; w++) if (valid[w]) cnt[owner[w]]++;
    if (mon_set) begin
      for (int w = 0; w < A; w++) if (!valid[w]) begin cnt_mon++; return w; end
      best = 0; bpos = -1;
      for (int w = 0; w < A; w++) if (int'(lru[w]) > bpos) begin bpos = lru[w]; best = w; end
      cnt_mon++; return best;
    end
    if (cnt[core] > 0 && cnt[core] >= int'(quota[core])) begin
      bpos = -1; best = 0;
      for (int w = 0; w < A; w++)
        if (valid[w] && owner[w] == core && int'(lru[w]) > bpos) begin bpos = lru[w]; best = w; end
      cnt_own++; return best;
    end
    for (int w = 0; w < A; w++) if (!valid[w]) begin cnt_inv++; return w; end
    bpos = -1; best = 0;
    for (int w = 0; w < A; w++)
      if (owner[w] != core && cnt[owner[w]] > int'(quota[owner[w]]) && int'(lru[w]) > bpos) begin
        bpos = lru[w]; best = w;
      end
    if (bpos >= 0) begin cnt_over++; return best; end
    for (int w = 0; w < A; w++) if (int'(lru[w]) > bpos) begin bpos = lru[w]; best = w; end
    cnt_any++; return best;
  endfunction

  task automatic random_perm();
    int p[A];
    for (int i = 0; i < A; i++) p[i] = i;
    for (int i = A-1; i > 0; i--) begin
      int j, t;
      j = $urandom_range(0, i); t = p[i]; p[i] = p[j]; p[j] = t;
    end
    for (int i = 0; i < A; i++) lru[i] = 4'(p[i]);
  endtask

  initial begin
    int e;
    // Phase change with two ways per core: core 0 owns ways 0,1 (a1,a2),
    // core 1 owns ways 6,7 (x1,x2), the rest is empty. Core 0 must replace
    // its own LRU line, not take an empty (drowsy) way.
    valid = 16'h00C3; for (int w = 0; w < A; w++) owner[w] = (w >= 6);
    for (int w = 0; w < A; w++) lru[w] = 4'(w);
    lru[0] = 1; lru[1] = 0;
    core = 0; quota[0] = 2; quota[1] = 2; mon_set = 0;
    #1 checks++;
    if (victim !== 0) begin failures++; $display("FAIL phase change: victim %0d", victim); end
    quota[0] = 3;
    #1 checks++;
    if (victim !== 2) begin failures++; $display("FAIL under quota: victim %0d", victim); end

    for (int n = 0; n < 3000; n++) begin
      random_perm();
      case (n % 3)
        0: valid = '1;
        1: valid = 16'($urandom) | 16'($urandom);
        default: valid = 16'($urandom);
      endcase
      for (int w = 0; w < A; w++) owner[w] = 1'($urandom);
      core = 1'($urandom);
      quota[0] = 5'($urandom_range(1, 15));
      quota[1] = 5'($urandom_range(1, 16 - quota[0]));
      mon_set = ($urandom_range(0, 7) == 0);
      #1;
      e = ref_victim();
      checks++;
      if (int'(victim) != e) begin
        failures++;
        $display("FAIL n=%0d victim %0d expected %0d", n, victim, e);
      end
    end
    $display("cases: mon=%0d own=%0d invalid=%0d over=%0d any=%0d",
             cnt_mon, cnt_own, cnt_inv, cnt_over, cnt_any);
    checks++;
    if (cnt_mon == 0 || cnt_own == 0 || cnt_inv == 0 || cnt_over == 0) begin
      failures++; $display("FAIL some replacement case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
