// tb_survival_array: end-to-end test of the survival array at its default
// 6 x 6 size.
//
// Every FC gets a random function and matching good results, every SC is
// downloaded as a live spare and every RC with direct routes. Then, for each
// scenario, faults are injected into FCs while the array keeps running on
// random inputs, and every FC result at slot_out is compared each cycle with
// the function the testbench chose for that place. Scenarios:
//   - north spare has priority over the south spare of the same FC
//   - two neighbouring FCs fail together; two different spares repair them
//   - the prior spare is dead or fails its own check: the other one repairs
//   - an FC between east and west spares, and one at the array's east edge
//   - all spares of an FC are used up: the fault is flagged as unrepaired
// Each repair must restore the result two clock edges after the fault. The
// testbench counts each mechanism and fails if one never happened.
module tb_survival_array;
  import survival_pkg::*;
  localparam int C = 6, R = 6;

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
  int n_detect = 0, n_primary = 0, n_secondary = 0, n_reroute = 0;
  int n_double = 0, n_spare_excluded = 0, n_unrepaired = 0, n_edge = 0;

  localparam logic [3:0] TT [NUM_FUNC] = '{
    4'b1000, 4'b1110, 4'b0111, 4'b0001, 4'b0110,
    4'b1001, 4'b1000, 4'b0010, 4'b0101, 4'b1010
  };

  int  func  [R][C];      // function chosen per FC place
  bit  skip  [R][C];      // FC places whose result is not expected to be right

  survival_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Count route changes seen on any RC
  logic [ROUTE_W-1:0] last_route [R][C];
  always @(posedge clk) begin
    for (int j = 0; j < R; j++)
      for (int i = 0; i < C; i++) begin
        if (rst_n && !is_fc(i, j) && !is_sc(i, j))
          for (int d = 0; d < 4; d++)
            if (rc_route[j][i][2*d +: 2] != last_route[j][i][2*d +: 2] &&
                last_route[j][i][2*d +: 2] == 2'b00)
              n_reroute++;
        last_route[j][i] <= rc_route[j][i];
      end
  end

  task automatic drive_random();
    for (int j = 0; j < R; j++)
      for (int i = 0; i < C; i++)
        slot_in[j][i] = 2'($urandom);
  endtask

  // Compare every FC result that should be right
  task automatic check_all(string what);
    #1;
    for (int j = 0; j < R; j++)
      for (int i = 0; i < C; i++)
        if (is_fc(i, j) && !skip[j][i])
          chk(slot_out[j][i] == TT[func[j][i]][slot_in[j][i]],
              $sformatf("%s: result of FC col %0d row %0d", what, i, j));
  endtask

  task automatic run_cycles(int n, string what);
    repeat (n) begin
      @(negedge clk);
      drive_random();
      check_all(what);
    end
  endtask

  task automatic download(int i, int j, logic [GENE_W-1:0] g);
    @(negedge clk);
    cfg_we = 1; cfg_col = 8'(i); cfg_row = 8'(j); cfg_data = g;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // Reset and configure; dead_sc lists spares downloaded with life 0
  task automatic setup(int dead_i = -1, int dead_j = -1);
    @(negedge clk);
    rst_n = 1'b0; repair_en = 1'b0; cfg_we = 0;
    for (int j = 0; j < R; j++)
      for (int i = 0; i < C; i++) begin
        fault_inj[j][i] = 1'b0;
        skip[j][i] = 1'b0;
      end
    @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < R; j++)
      for (int i = 0; i < C; i++) begin
        if (is_fc(i, j)) begin
          func[j][i] = $urandom_range(0, NUM_FUNC - 1);
          download(i, j, {2'b11, 10'(1 << func[j][i]), TT[func[j][i]]});
        end else if (is_sc(i, j)) begin
          download(i, j, (i == dead_i && j == dead_j) ? 16'h0000 : 16'h4000);
        end else begin
          download(i, j, 16'h0000);
        end
      end
    @(negedge clk);
    repair_en = 1'b1;
    run_cycles(5, "after download");
    chk(!sys_fault, "no fault after download");
  endtask

  // Inject faults into FCs (all at once) and expect the given spares to take
  // them; checks the two-edge repair time on the injected places
  task automatic fail_and_expect(int fi[], int fj[], int si[], int sj[], logic [3:0] sd[],
                                 string what);
    @(negedge clk);
    drive_random();
    foreach (fi[k]) fault_inj[fj[k]][fi[k]] = 1'b1;
    #1;
    foreach (fi[k]) begin
      chk(!cell_ok[fj[k]][fi[k]], {what, ": fault detected on line"});
      if (!cell_ok[fj[k]][fi[k]]) n_detect++;
      chk(slot_out[fj[k]][fi[k]] != TT[func[fj[k]][fi[k]]][slot_in[fj[k]][fi[k]]],
          {what, ": result wrong before repair"});
    end
    @(posedge clk);
    @(negedge clk);
    #1;
    foreach (si[k]) chk(sc_taken[sj[k]][si[k]] == sd[k], {what, ": the expected spare took over"});
    foreach (fi[k])
      chk(slot_out[fj[k]][fi[k]] != TT[func[fj[k]][fi[k]]][slot_in[fj[k]][fi[k]]],
          {what, ": result still wrong after one edge"});
    @(posedge clk);
    @(negedge clk);
    check_all({what, ": two edges after the fault"});
    foreach (sd[k]) begin
      if (sd[k] == 4'b0010 || sd[k] == 4'b1000) n_primary++;
      if (sd[k] == 4'b0001 || sd[k] == 4'b0100) n_secondary++;
    end
    if (fi.size() > 1) n_double++;
    run_cycles(20, {what, ": running after repair"});
    chk(!sys_fault, {what, ": no unrepaired fault"});
  endtask

  initial begin
    int none_i[$], none_j[$];
    logic [3:0] none_d[$];
    rst_n = 1'b0; repair_en = 1'b0; cfg_we = 0; cfg_col = '0; cfg_row = '0; cfg_data = '0;
    for (int j = 0; j < R; j++)
      for (int i = 0; i < C; i++) begin
        slot_in[j][i] = '0; fault_inj[j][i] = 1'b0; last_route[j][i] = '0;
      end

    // Fault-free run: nothing moves
    setup();
    run_cycles(50, "fault-free");
    for (int j = 0; j < R; j++)
      for (int i = 0; i < C; i++)
        if (is_sc(i, j)) chk(sc_taken[j][i] == '0, "no spare used without a fault");

    // FC col 2 row 3: north spare (2,4) has priority over south spare (2,2)
    setup();
    fail_and_expect('{2}, '{3}, '{2, 2}, '{4, 2}, '{4'b0010, 4'b0000}, "north priority");

    // FCs (2,1) and (3,2) fail together: spare (2,2) takes (2,1), spare (4,2) takes (3,2)
    setup();
    fail_and_expect('{2, 3}, '{1, 2}, '{2, 4}, '{2, 2}, '{4'b0010, 4'b1000}, "double fault");

    // The north spare of FC (2,3) is dead: the south spare repairs
    setup(2, 4);
    fail_and_expect('{2}, '{3}, '{2, 2}, '{4, 2}, '{4'b0000, 4'b0001}, "prior spare dead");

    // The north spare of FC (2,3) fails its own check: the south spare repairs
    setup();
    @(negedge clk); fault_inj[4][2] = 1'b1; #1;
    chk(!cell_ok[4][2], "faulty spare detected by its own check");
    if (!cell_ok[4][2]) n_spare_excluded++;
    fail_and_expect('{2}, '{3}, '{2, 2}, '{4, 2}, '{4'b0000, 4'b0001}, "prior spare faulty");

    // FC (1,2) between west spare (0,2) and east spare (2,2): east has priority
    setup();
    fail_and_expect('{1}, '{2}, '{2, 0}, '{2, 2}, '{4'b1000, 4'b0000}, "east priority");

    // FC (5,2) at the east edge has only its west spare (4,2)
    setup();
    fail_and_expect('{5}, '{2}, '{4}, '{2}, '{4'b0100}, "east edge");
    n_edge++;

    // Spares used up: (2,2) takes (2,1); (0,2) takes (1,2); (0,1) is left
    // with (0,2) busy and (0,0) dead
    setup(0, 0);
    fail_and_expect('{2}, '{1}, '{2}, '{2}, '{4'b0010}, "first of three");
    fail_and_expect('{1}, '{2}, '{0, 2}, '{2, 2}, '{4'b0100, 4'b0010}, "second of three");
    @(negedge clk);
    fault_inj[1][0] = 1'b1;
    skip[1][0] = 1'b1;
    run_cycles(5, "third of three");
    chk(sys_fault, "unrepairable fault flagged");
    if (sys_fault) n_unrepaired++;
    chk(sc_taken[0][0] == '0 && sc_taken[2][0] == 4'b0100, "no spare left for the third fault");

    // Every mechanism must have happened
    chk(n_detect > 0,         "mechanism: on-line detection");
    chk(n_primary > 0,        "mechanism: repair by the prior spare");
    chk(n_secondary > 0,      "mechanism: repair by the second spare");
    chk(n_reroute > 0,        "mechanism: reroute in a routing cell");
    chk(n_double > 0,         "mechanism: simultaneous double fault");
    chk(n_spare_excluded > 0, "mechanism: faulty spare excluded");
    chk(n_unrepaired > 0,     "mechanism: unrepairable fault flagged");
    chk(n_edge > 0,           "mechanism: repair at the array edge");
    $display("detections=%0d primary=%0d secondary=%0d reroutes=%0d double=%0d spare_excluded=%0d unrepaired=%0d edge=%0d",
             n_detect, n_primary, n_secondary, n_reroute, n_double, n_spare_excluded, n_unrepaired, n_edge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
