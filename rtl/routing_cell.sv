// routing_cell: routing cell (RC) of the survival array.
//
// An RC sits between four working cells (FC), one on each side, and touches
// four spare cells (SC) on its diagonals. When an SC replaces one of the FCs,
// the RC carries that SC's output in place of the FC's, so the rest of the
// system keeps reading the FC's result at the same port.
//
// It has no logic block. Its memory holds half as many flags as an FC's: 8
// flags, two per FC side, giving the route of that side (see route_e):
// direct, first candidate SC, second candidate SC, or off. Its self-repairing
// part compares the four FCs' survival codes with the healthy chain 00110110
// in parallel. When an FC side shows a fault and is still routed directly, the
// routing controller looks at the two diagonal SCs that can replace that FC
// and switches the side to the one that has taken it; the route then stays.
//
// Candidates (diagonal SCs are NE=0, NW=1, SE=2, SW=3):
//   N FC: NE SC (its W side) first, NW SC (its E side) second
//   S FC: SE SC (its W side) first, SW SC (its E side) second
//   E FC: NE SC (its S side) first, SE SC (its N side) second
//   W FC: NW SC (its S side) first, SW SC (its N side) second
//
// The memory size, the RC's role and its place in the array follow the
// document; the meaning of the eight flags and the candidate order are this
// design's choice. Routes are written by the initial download (cfg_we) or
// updated one clock edge after the SC asserts taken; routed_out is
// combinational from the current route.
module routing_cell
  import survival_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_we,
  input  logic [ROUTE_W-1:0] cfg_data,
  input  logic               repair_en,
  input  logic [7:0]         rx_code,        // codes from the N, S, E, W FCs
  input  logic [3:0]         fc_out,         // primary outputs of the N, S, E, W FCs
  input  logic [3:0]         sc_res,         // primary outputs of the NE, NW, SE, SW SCs
  input  logic [3:0]         sc_taken [4],   // taken vectors of the NE, NW, SE, SW SCs
  output logic [3:0]         routed_out,     // result seen in place of each FC
  output logic [3:0]         fault,          // comparator results per FC side
  output logic [3:0]         unrepaired,     // faulty and still routed directly
  output logic [ROUTE_W-1:0] route_q
);

  localparam int unsigned NE = 0, NW = 1, SE = 2, SW = 3;

  logic [ROUTE_W-1:0] route_d;
  logic               upd;
  logic [1:0]         cand  [4];   // diagonal index of candidate 0 and 1 per side
  logic [1:0]         cand1 [4];
  logic [3:0]         c0_has, c1_has;

  // Candidate table
  always_comb begin
    cand[DIR_N] = 2'(NE); cand1[DIR_N] = 2'(NW);
    cand[DIR_S] = 2'(SE); cand1[DIR_S] = 2'(SW);
    cand[DIR_E] = 2'(NE); cand1[DIR_E] = 2'(SE);
    cand[DIR_W] = 2'(NW); cand1[DIR_W] = 2'(SW);
    c0_has[DIR_N] = sc_taken[NE][DIR_W]; c1_has[DIR_N] = sc_taken[NW][DIR_E];
    c0_has[DIR_S] = sc_taken[SE][DIR_W]; c1_has[DIR_S] = sc_taken[SW][DIR_E];
    c0_has[DIR_E] = sc_taken[NE][DIR_S]; c1_has[DIR_E] = sc_taken[SE][DIR_N];
    c0_has[DIR_W] = sc_taken[NW][DIR_S]; c1_has[DIR_W] = sc_taken[SW][DIR_N];
  end

  // Parallel comparator
  always_comb begin
    for (int d = 0; d < 4; d++)
      fault[d] = (code_field(rx_code, dir_e'(d)) != code_field(CODE_RECV, dir_e'(d)));
  end

  // Routing controller
  always_comb begin
    route_d = route_q;
    upd     = 1'b0;
    for (int d = 0; d < 4; d++) begin
      if (repair_en && fault[d] && route_e'(route_q[2*d +: 2]) == RT_DIRECT) begin
        if (c0_has[d]) begin
          route_d[2*d +: 2] = RT_CAND0;
          upd = 1'b1;
        end else if (c1_has[d]) begin
          route_d[2*d +: 2] = RT_CAND1;
          upd = 1'b1;
        end
      end
    end
  end

  gene_memory #(.WIDTH(ROUTE_W)) u_mem (
    .clk, .rst_n,
    .cfg_we, .cfg_data,
    .rep_we(upd), .rep_data(route_d),
    .q(route_q)
  );

  always_comb begin
    for (int d = 0; d < 4; d++) begin
      unique case (route_e'(route_q[2*d +: 2]))
        RT_DIRECT: routed_out[d] = fc_out[d];
        RT_CAND0:  routed_out[d] = sc_res[cand[d]];
        RT_CAND1:  routed_out[d] = sc_res[cand1[d]];
        default:   routed_out[d] = 1'b0;
      endcase
      unrepaired[d] = fault[d] && (route_e'(route_q[2*d +: 2]) == RT_DIRECT);
    end
  end

endmodule
