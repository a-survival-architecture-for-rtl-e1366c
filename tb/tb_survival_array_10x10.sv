// tb_survival_array_10x10: random fault sequences on a 10 x 10 array.
//
// A 10 x 10 array is the size that goes with a cell fault probability of 0.01
// (n close to sqrt(1/p)). In each run the array is downloaded with random
// functions, then working cells fail one after another, at random places,
// while the array keeps computing, until a fault can no longer be repaired.
// Spares are assumed fault-free. For every fault the testbench predicts, from
// the geometry alone, which spare must take over: the prior spare (north of an
// FC in an even column, east of one in an odd column) if it exists and is
// unused, else the other one, else none. It checks that spare's taken flag,
// every FC result two clock edges after each fault, and the unrepaired flag.
// It prints how many faults each run survived.
module tb_survival_array_10x10;
  import survival_pkg::*;
  localparam int C = 10, R = 10, RUNS = 40;

  logic clk = 1'b0, rst_n, repair_en, cfg_we, sys_fault;
  logic [7:0] cfg_col, cfg_row;
  logic [GENE_W-1:0] cfg_data;
  logic [1:0]  slot_in   [R][C];
  logic        fault_inj [R][C];
  logic        slot_out  [R][C];
  logic        cell_ok   [R][C];
  logic        nbr_alarm [R][C];
  logic [3:0]  sc_taken  [R][C];
  logic [ROUTE_W-1:0] rc_route [R][C];

  int checks = 0, failures = 0;
  int survived_total = 0, n_primary = 0, n_secondary = 0, n_lost = 0;

  localparam logic [3:0] TT [NUM_FUNC] = '{
    4'b1000, 4'b1110, 4'b0111, 4'b0001, 4'b0110,
    4'b1001, 4'b1000, 4'b0010, 4'b0101, 4'b1010
  };

  int  func  [R][C];
  bit  faulty[R][C];
  bit  lost  [R][C];     // faulty and not repaired
  bit  used  [R][C];     // spare already in use
  logic [3:0] exp_taken [R][C];

  survival_array #(.COLS(C), .ROWS(R)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_fc(int i, int j);
    return (i % 2) != (j % 2);
  endfunction
  function automatic bit is_sc(int i, int j);
    return (i % 2 == 0) && (j % 2 == 0);
  endfunction
  function automatic bit in_grid(int i, int j);
    return i >= 0 && i < C && j >= 0 && j < R;
  endfunction

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic check_all(string what);
    for (int j = 0; j < R; j++)
      for (int i = 0; i < C; i++)
        slot_in[j][i] = 2'($urandom);
    #1;
    for (int j = 0; j < R; j++)
      for (int i = 0; i < C; i++) begin
        if (is_fc(i, j) && !lost[j][i])
          chk(slot_out[j][i] == TT[func[j][i]][slot_in[j][i]], what);
        if (is_sc(i, j))
          chk(sc_taken[j][i] == exp_taken[j][i], {what, ": spare use"});
      end
  endtask

  task automatic setup();
    @(negedge clk);
    rst_n = 1'b0; repair_en = 1'b0; cfg_we = 0;
    for (int j = 0; j < R; j++)
      for (int i = 0; i < C; i++) begin
        fault_inj[j][i] = 0; faulty[j][i] = 0; lost[j][i] = 0; used[j][i] = 0;
        exp_taken[j][i] = '0;
      end
    @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < R; j++)
      for (int i = 0; i < C; i++) begin
        cfg_we = 1; cfg_col = 8'(i); cfg_row = 8'(j);
        if (is_fc(i, j)) begin
          func[j][i] = $urandom_range(0, NUM_FUNC - 1);
          cfg_data = {2'b11, 10'(1 << func[j][i]), TT[func[j][i]]};
        end else begin
          cfg_data = is_sc(i, j) ? 16'h4000 : 16'h0000;
        end
        @(negedge clk);
      end
    cfg_we = 0; repair_en = 1'b1;
    @(negedge clk);
    check_all("after download");
  endtask

  initial begin
    rst_n = 1'b0; repair_en = 0; cfg_we = 0; cfg_col = '0; cfg_row = '0; cfg_data = '0;
    for (int j = 0; j < R; j++)
      for (int i = 0; i < C; i++) begin slot_in[j][i] = '0; fault_inj[j][i] = 0; end

    for (int run = 0; run < RUNS; run++) begin
      int survived;
      bit done;
      survived = 0;
      done = 0;
      setup();
      while (!done) begin
        int fi, fj, pi, pj, si, sj;
        logic [3:0] pd, sd;
        // pick a working FC that has not failed yet
        do begin
          fi = $urandom_range(0, C - 1);
          fj = $urandom_range(0, R - 1);
        end while (!is_fc(fi, fj) || faulty[fj][fi]);
        if (fi % 2 == 0) begin
          pi = fi; pj = fj + 1; pd = 4'b0010;   // north spare sees the FC on its south
          si = fi; sj = fj - 1; sd = 4'b0001;
        end else begin
          pi = fi + 1; pj = fj; pd = 4'b1000;   // east spare sees it on its west
          si = fi - 1; sj = fj; sd = 4'b0100;
        end
        @(negedge clk);
        fault_inj[fj][fi] = 1'b1;
        faulty[fj][fi] = 1'b1;
        if (in_grid(pi, pj) && !used[pj][pi]) begin
          used[pj][pi] = 1; exp_taken[pj][pi] = pd; n_primary++; survived++;
        end else if (in_grid(si, sj) && !used[sj][si]) begin
          used[sj][si] = 1; exp_taken[sj][si] = sd; n_secondary++; survived++;
        end else begin
          lost[fj][fi] = 1; n_lost++; done = 1;
        end
        repeat (2) @(posedge clk);
        @(negedge clk);
        check_all("two edges after a fault");
        chk(sys_fault == done, "unrepaired flag");
        repeat (2) begin @(negedge clk); check_all("running"); end
      end
      survived_total += survived;
      $display("run %0d: %0d faults repaired before the first unrepairable one", run, survived);
    end
    $display("average faults survived on %0dx%0d: %0.2f (primary %0d, secondary %0d)",
             C, R, real'(survived_total) / RUNS, n_primary, n_secondary);
    chk(n_primary > 0 && n_secondary > 0 && n_lost == RUNS, "all repair kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
