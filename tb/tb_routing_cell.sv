// tb_routing_cell: self-checking test of the routing cell.
// For each FC side and each of its two candidate spares, a fault code plus the
// spare's taken flag must switch that side, on the next clock edge, to the
// spare's output, and the route must then stay. Also checks the direct route,
// the disabled route, download of routes, the unrepaired flag, and that no
// route moves while repair is disabled or without a claiming spare.
module tb_routing_cell;
  import survival_pkg::*;
  logic clk = 1'b0, rst_n;
  logic cfg_we, repair_en;
  logic [ROUTE_W-1:0] cfg_data, route_q;
  logic [7:0] rx_code;
  logic [3:0] fc_out, sc_res, routed_out, fault, unrepaired;
  logic [3:0] sc_taken [4];
  int checks = 0, failures = 0;

  // Diagonal index (NE=0, NW=1, SE=2, SW=3) and the side of that spare that
  // faces the FC, for candidate 0 and 1 of each FC side N, S, E, W
  localparam int C0_SC [4] = '{0, 2, 0, 1};
  localparam int C0_SD [4] = '{3, 3, 1, 1};
  localparam int C1_SC [4] = '{1, 3, 2, 3};
  localparam int C1_SD [4] = '{2, 2, 0, 0};

  routing_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic logic [7:0] codes(logic [3:0] bad);
    logic [7:0] w = 8'b00110110;
    for (int d = 0; d < 4; d++) if (bad[d]) w[7-2*d -: 2] = ~w[7-2*d -: 2];
    return w;
  endfunction

  task automatic restart();
    @(negedge clk);
    rst_n = 1'b0; rx_code = codes('0); cfg_we = 0;
    for (int k = 0; k < 4; k++) sc_taken[k] = '0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // Random data on the cells; check every side against the route expected
  task automatic check_outputs(logic [1:0] rt [4], string what);
    for (int n = 0; n < 8; n++) begin
      fc_out = 4'($urandom); sc_res = 4'($urandom); #1;
      for (int d = 0; d < 4; d++) begin
        logic e;
        case (rt[d])
          2'b00:   e = fc_out[d];
          2'b01:   e = sc_res[C0_SC[d]];
          2'b10:   e = sc_res[C1_SC[d]];
          default: e = 1'b0;
        endcase
        chk(routed_out[d] == e, what);
      end
    end
  endtask

  initial begin
    logic [1:0] rt [4];
    rst_n = 1'b0; cfg_we = 0; cfg_data = '0; repair_en = 1'b1;
    rx_code = codes('0); fc_out = '0; sc_res = '0;
    for (int k = 0; k < 4; k++) sc_taken[k] = '0;
    #1; rst_n = 1'b1;
    rt = '{default: 2'b00};
    check_outputs(rt, "direct after reset");
    chk(route_q == 8'h00 && unrepaired == '0 && fault == '0, "healthy state");

    for (int d = 0; d < 4; d++)
      for (int c = 0; c < 2; c++) begin
        restart();
        rx_code = codes(4'(1 << d)); #1;
        chk(fault == 4'(1 << d) && unrepaired == 4'(1 << d), "fault seen, unrepaired");
        @(posedge clk); #1;
        chk(route_q == 8'h00, "no reroute without a spare");
        @(negedge clk);
        if (c == 0) sc_taken[C0_SC[d]][C0_SD[d]] = 1'b1;
        else        sc_taken[C1_SC[d]][C1_SD[d]] = 1'b1;
        @(posedge clk); #1;
        rt = '{default: 2'b00};
        rt[d] = (c == 0) ? 2'b01 : 2'b10;
        chk(route_q == 8'(rt[d] << (2*d)), "route switched in one edge");
        chk(unrepaired == '0, "repaired side not flagged");
        check_outputs(rt, "rerouted");
        // the route stays even if the claim drops
        @(negedge clk);
        for (int k = 0; k < 4; k++) sc_taken[k] = '0;
        @(posedge clk); #1;
        check_outputs(rt, "route held");
      end

    // Both candidates: first wins
    restart();
    rx_code = codes(4'b0001);
    sc_taken[C0_SC[0]][C0_SD[0]] = 1'b1; sc_taken[C1_SC[0]][C1_SD[0]] = 1'b1;
    @(posedge clk); #1;
    chk(route_q[1:0] == 2'b01, "first candidate preferred");

    // A spare's claim on another side does not reroute this one
    restart();
    rx_code = codes(4'b0001);
    sc_taken[0][1] = 1'b1;     // NE spare took its south FC, i.e. the east FC
    @(posedge clk); #1;
    chk(route_q == 8'h00, "unrelated claim ignored");

    // Disabled repair (download stage)
    restart();
    repair_en = 1'b0;
    rx_code = codes(4'b1111);
    sc_taken[0] = 4'b1111;
    @(posedge clk); #1;
    chk(route_q == 8'h00, "no reroute while repair disabled");
    repair_en = 1'b1;

    // Download of routes, including the off state
    restart();
    @(negedge clk); cfg_we = 1; cfg_data = 8'b11_10_01_00;
    @(negedge clk); cfg_we = 0;
    chk(route_q == 8'b11_10_01_00, "route download");
    rt = '{2'b00, 2'b01, 2'b10, 2'b11};
    check_outputs(rt, "downloaded routes");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
