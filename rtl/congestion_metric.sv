// congestion_metric: the router-wide congestion metric (CM) of one router.
//
// What it computes follows the published method:
//   Router status         = OutFlits / CandidateVCs * OutFlits / OutputPorts
//   Router occupancy rate = (1/V) * sum over the V VC buffers of (occupancy / depth)
//   CM                    = Router status * Router occupancy rate
// and CM is 1.0 when no VC is a candidate, which avoids dividing by zero.
// OutFlits is the number of output ports that send a flit this cycle.
// CandidateVCs is the number of input VCs that hold a flit. V is the number of
// VC buffers in the router (all ports together).
//
// Hardware form (this design's choice): everything is folded into one integer
// division,
//   CM = floor( OutFlits^2 * OccSum * 2^CM_FRAC / (CandidateVCs * NUM_OUT * V * DEPTH) )
// where OccSum is the summed occupancy of all VC buffers. The result saturates at
// CM_ONE (1.0). The inputs describe the current cycle; the metric is registered,
// so neighbours see it from the next cycle on. It resets to 1.0, the value of an
// idle router.
module congestion_metric
  import noc_pkg::*;
#(
  parameter int unsigned NUM_OUT = NUM_PORTS,            // output ports of the router
  parameter int unsigned V       = NUM_PORTS * NUM_VCS,  // VC buffers in the router
  parameter int unsigned DEPTH   = BUF_DEPTH             // flits per VC buffer
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [$clog2(NUM_OUT+1)-1:0]       out_flits,
  input  logic [$clog2(V+1)-1:0]             cand_vcs,
  input  logic [$clog2(V*DEPTH+1)-1:0]       occ_sum,
  output cm_t                                cm,
  output logic                               cm_idle    // this cycle has no candidate VC
);
  localparam int unsigned NUM_W = 2*$clog2(NUM_OUT+1) + $clog2(V*DEPTH+1) + CM_FRAC;
  localparam int unsigned DEN_W = $clog2(V+1) + $clog2(NUM_OUT*V*DEPTH+1);

  logic [NUM_W-1:0] num;
  logic [DEN_W-1:0] den;
  logic [NUM_W-1:0] quo;
  cm_t              cm_next;

  assign cm_idle = (cand_vcs == '0);

  always_comb begin
    num = (NUM_W'(out_flits) * NUM_W'(out_flits) * NUM_W'(occ_sum)) << CM_FRAC;
    den = DEN_W'(cand_vcs) * DEN_W'(NUM_OUT * V * DEPTH);
    quo = cm_idle ? '0 : num / NUM_W'(den);
    if (cm_idle)                       cm_next = CM_ONE;
    else if (quo >= NUM_W'(CM_ONE))    cm_next = CM_ONE;
    else                               cm_next = cm_t'(quo);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cm <= CM_ONE;
    else        cm <= cm_next;
  end

endmodule
