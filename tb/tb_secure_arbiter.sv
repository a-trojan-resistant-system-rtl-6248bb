// tb_secure_arbiter -- self-checking test of the secure arbiter.
//
// Part 1 is directed: a master that keeps LOCK asserted is checked to lose the
// bus exactly after lock_thresh locked cycles, to be masked, and to stay
// excluded until software clears its mask bit; an unauthorized access masks
// the owner at once.  Part 2 drives random requests, locks, wait states,
// unauthorized-access pulses and mask clears, and compares every output with a
// cycle-level reference model of the arbitration, lock counter and mask rules.
module tb_secure_arbiter;
  import trojan_bus_pkg::*;

  localparam int unsigned NM = 3, CW = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NM-1:0] req, lock, master_mask_clr, grant, master_mask;
  logic bus_busy, unauth, owner_valid, master_lock, mal_lock;
  logic [CW-1:0] lock_thresh;
  logic [1:0] master_id, lock_master;

  int checks = 0, failures = 0;
  int n_mal_lock = 0, n_unauth_mask = 0, n_busy_hold = 0, n_lock_hold = 0, n_switch = 0;

  secure_arbiter #(.NM(NM), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference state
  logic [1:0]    r_id;
  logic          r_valid;
  logic [NM-1:0] r_mask;
  logic [CW-1:0] r_cnt;
  logic [1:0]    r_lmaster;

  task automatic model_and_check();
    logic [NM-1:0] rq, lk;
    logic olock, mlock, mlk_out, hold, fnd;
    logic [1:0] nid;
    logic [NM-1:0] mset;
    rq = req & ~r_mask; lk = lock & ~r_mask;
    olock = r_valid && lk[r_id];
    mlock = olock && (r_cnt >= lock_thresh);
    mlk_out = olock && !mlock;
    hold = r_valid && (bus_busy || mlk_out) && !unauth;
    mset = '0;
    if (r_valid && (mlock || unauth)) mset[r_id] = 1'b1;
    fnd = 0; nid = r_id;
    for (int k = 1; k <= 3; k++) begin
      int j;
      j = (int'(r_id) + k) % 3;
      if (!fnd && rq[j] && !mset[j]) begin fnd = 1; nid = 2'(j); end
    end
    check(grant == (r_valid ? (3'b001 << r_id) : 3'b000), "grant");
    check(owner_valid == r_valid && (!r_valid || master_id == r_id), "owner");
    check(mal_lock == mlock, "mal_lock");
    check(master_lock == mlk_out, "master_lock");
    check(master_mask == r_mask, "master_mask");
    check(lock_master == r_lmaster, "lock_master");
    if (mlock) n_mal_lock++;
    if (r_valid && unauth) n_unauth_mask++;
    if (hold && bus_busy) n_busy_hold++;
    if (hold && mlk_out) n_lock_hold++;
    // next state
    r_mask = (r_mask & ~master_mask_clr) | mset;
    if (mlock) r_lmaster = r_id;
    if (!hold) begin
      if (fnd && nid != r_id) n_switch++;
      r_valid = fnd; r_id = nid;
    end
    r_cnt = (hold && mlk_out) ? r_cnt + 1'b1 : '0;
  endtask

  initial begin
    int t0, held;
    req = 0; lock = 0; bus_busy = 0; unauth = 0; master_mask_clr = 0; lock_thresh = 16'd8;
    r_id = 0; r_valid = 0; r_mask = 0; r_cnt = 0; r_lmaster = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- directed: master 1 locks forever, master 0 also requests
    @(negedge clk);
    req = 3'b010; lock = 3'b010;
    @(negedge clk);
    check(grant == 3'b010, "m1 granted");
    req = 3'b011;
    held = 0;
    while (grant[1] && held < 100) begin
      if (mal_lock) break;
      held++;
      @(negedge clk);
    end
    check(held == 8 && mal_lock, "lock broken after lock_thresh locked cycles");
    @(negedge clk);
    check(grant == 3'b001, "master 0 takes over after malicious lock");
    check(master_mask == 3'b010 && lock_master == 2'd1, "master 1 masked");
    req = 3'b010;  // master 1 alone keeps asking: must be refused
    repeat (5) begin @(negedge clk); check(grant == 3'b000, "masked master refused"); end
    master_mask_clr = 3'b010; lock = 3'b000;
    @(negedge clk); master_mask_clr = 0;
    @(negedge clk);
    check(grant == 3'b010, "master 1 granted again after software clear");
    // unauthorized access by master 1 while owner
    unauth = 1;
    @(negedge clk); unauth = 0;
    check(master_mask == 3'b010 && grant == 3'b000, "unauthorized access masks owner");
    req = 0;
    master_mask_clr = 3'b111;
    @(negedge clk); master_mask_clr = 0;
    @(negedge clk);

    // ---- random phase against the reference model
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    r_id = 0; r_valid = 0; r_mask = 0; r_cnt = 0; r_lmaster = 0;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      if (it % 50 == 0) lock_thresh = 16'($urandom_range(0, 12));
      req = 3'($urandom);
      if ($urandom_range(0, 3) != 0) lock = lock ^ (3'b001 << $urandom_range(0, 2)) & 3'($urandom);
      if ($urandom_range(0, 7) == 0) lock = 3'($urandom);
      bus_busy = ($urandom_range(0, 3) == 0) && owner_valid;
      unauth = ($urandom_range(0, 40) == 0) && owner_valid;
      master_mask_clr = ($urandom_range(0, 15) == 0) ? 3'($urandom) : 3'b000;
      #1;
      model_and_check();
    end
    check(n_mal_lock > 0 && n_unauth_mask > 0 && n_busy_hold > 0 && n_lock_hold > 0 && n_switch > 0,
          "coverage");
    $display("mal_lock=%0d unauth=%0d busy_hold=%0d lock_hold=%0d switches=%0d",
             n_mal_lock, n_unauth_mask, n_busy_hold, n_lock_hold, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
