// tb_pe_synch: 3 PEs, 7 masks (3 passes per stripe), 4 stripes. A model of
// the mask transfer controller answers every pass_start with mask_ready for
// PE 0, 1, 2 at increasing random delays (PE 1 and 2 without a mask in the
// last pass); a model of the PEs answers every pe_start with done after a
// random time. Checks: pass 0 is requested after reset and after each
// stripe (pre-loading); pe_start is never given outside a stripe and each
// PE starts exactly once per pass with the right has_mask; sync comes
// exactly one cycle after the last done, with the right pass number; and
// stripe_done comes with the third sync.
module tb_pe_synch;
  localparam int N_PE = 3, N_MASKS = 7, M = 3, STRIPES = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic stripe_start = 0, stripe_done, pass_start, sync, active;
  logic [N_PE-1:0] pe_done = '0, mask_ready = '0, mask_present = '0, pe_start, pe_has_mask;
  logic [15:0] pass_idx, sync_pass;

  pe_synch #(.N_PE(N_PE), .N_MASKS(N_MASKS)) dut (.*);

  int mr_cnt [N_PE];
  int pe_cnt [N_PE];
  int started [N_PE];
  int req_pass = -1, cur_pass = 0;
  int cyc = 0, last_done_cyc = -10, syncs = 0, stripes_done = 0, pass_reqs = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      // PE starts.
      for (int j = 0; j < N_PE; j++) if (pe_start[j]) begin
        check(active, "pe_start outside a stripe");
        check(started[j] == 0, $sformatf("PE %0d started twice", j));
        check(pe_has_mask[j] == (req_pass * N_PE + j < N_MASKS), $sformatf("PE %0d has_mask", j));
        started[j]++;
        pe_cnt[j] = pe_has_mask[j] ? $urandom_range(1, 25) : 1;
      end
      if (|pe_done) last_done_cyc = cyc;
      for (int j = 0; j < N_PE; j++) begin
        pe_done[j] <= (pe_cnt[j] == 1);
        if (pe_cnt[j] > 0) pe_cnt[j]--;
        mask_ready[j]   <= (mr_cnt[j] == 1);
        mask_present[j] <= (req_pass * N_PE + j < N_MASKS);
        if (mr_cnt[j] > 0) mr_cnt[j]--;
      end

      if (sync) begin
        check(cyc == last_done_cyc + 1, $sformatf("sync %0d cycles after the last done", cyc - last_done_cyc));
        check(int'(sync_pass) == cur_pass, $sformatf("sync_pass %0d expected %0d", sync_pass, cur_pass));
        check(stripe_done == (cur_pass == M - 1), "stripe_done with the wrong sync");
        check(pass_start, "no pass_start with sync");
        for (int j = 0; j < N_PE; j++) check(started[j] == 1, $sformatf("PE %0d started %0d times", j, started[j]));
        syncs++;
        cur_pass = (cur_pass + 1) % M;
      end else begin
        check(!stripe_done, "stripe_done without sync");
      end
      if (stripe_done) stripes_done++;

      // Transfer controller model.
      if (pass_start) begin
        check(int'(pass_idx) == cur_pass, $sformatf("pass_idx %0d expected %0d", pass_idx, cur_pass));
        req_pass = int'(pass_idx);
        pass_reqs++;
        mr_cnt[0] = $urandom_range(2, 15);
        for (int j = 1; j < N_PE; j++) mr_cnt[j] = mr_cnt[j-1] + $urandom_range(1, 15);
        for (int j = 0; j < N_PE; j++) started[j] = 0;
      end
    end
  end

  initial begin
    for (int j = 0; j < N_PE; j++) begin mr_cnt[j] = 0; pe_cnt[j] = 0; started[j] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < STRIPES; s++) begin
      // Rows arrive either before or after the pre-loaded masks.
      repeat ((s % 2 == 1) ? 60 : $urandom_range(1, 4)) @(negedge clk);
      stripe_start = 1;
      @(negedge clk);
      stripe_start = 0;
      wait (stripes_done == s + 1);
    end
    repeat (5) @(negedge clk);
    check(syncs == STRIPES * M, $sformatf("%0d syncs", syncs));
    check(pass_reqs == STRIPES * M + 1, $sformatf("%0d pass requests", pass_reqs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
