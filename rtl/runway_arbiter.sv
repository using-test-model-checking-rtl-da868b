// runway_arbiter: pipelined bus arbitration for the Runway bus.
//
// Every bus user (the clients and HOST) that wants to drive the bus raises req[u] in
// cycle N and keeps it raised until it is granted. The requests are registered at the end
// of cycle N; during cycle N+1 the winner is evaluated from them and registered, and in
// cycle N+2 grant[u] tells the winner that it owns the bus for that cycle. A user drops
// req in the cycle it is granted. Arbitration is pipelined: a new winner is evaluated in
// every cycle while the current one uses the bus.
//
// Priority: a user with a cache-to-cache write (c2cw) waiting (hipri[u]) beats every
// other user. Within each class a round-robin pointer, advanced past each winner, decides.
// The request-cycle N, evaluation-cycle N+1, mastership-cycle N+2 timing, the
// round-robin pointers and the c2cw priority follow the bus description; the exact
// round-robin order and the flow control are this design's choices.
//
// Flow control: a request for a coherent transaction (coh[u]) is held back while
// coh_allow is low, so that the snoop queues of all users cannot overflow.
// The user currently granted is excluded from evaluation, since its registered request
// is one cycle old; this keeps one request from winning twice.
module runway_arbiter #(
  parameter int unsigned NUSER = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NUSER-1:0] req,
  input  logic [NUSER-1:0] hipri,
  input  logic [NUSER-1:0] coh,
  input  logic             coh_allow,
  output logic [NUSER-1:0] grant
);
  localparam int unsigned UW = (NUSER > 1) ? $clog2(NUSER) : 1;

  logic [NUSER-1:0] req_q, hipri_q, coh_q;
  logic [NUSER-1:0] elig, elig_hi, win;
  logic [UW-1:0]    rr_ptr, win_idx;
  logic             win_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_q   <= '0;
      hipri_q <= '0;
      coh_q   <= '0;
    end else begin
      req_q   <= req;
      hipri_q <= hipri;
      coh_q   <= coh;
    end
  end

  // Round-robin pick among a candidate set, starting at rr_ptr.
  function automatic logic [UW:0] rr_pick(input logic [NUSER-1:0] cand, input logic [UW-1:0] ptr);
    logic [UW:0] r;
    r = '0;
    for (int unsigned k = 0; k < NUSER; k++) begin
      automatic int unsigned u = (int'(ptr) + k) % NUSER;
      if (!r[UW] && cand[u]) r = {1'b1, UW'(u)};
    end
    return r;
  endfunction

  always_comb begin
    elig    = req_q & ~grant & ~(coh_q & {NUSER{!coh_allow}});
    elig_hi = elig & hipri_q;
    if (|elig_hi) {win_valid, win_idx} = rr_pick(elig_hi, rr_ptr);
    else          {win_valid, win_idx} = rr_pick(elig, rr_ptr);
    win = '0;
    if (win_valid) win[win_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant  <= '0;
      rr_ptr <= '0;
    end else begin
      grant <= win;
      if (win_valid) rr_ptr <= (win_idx == UW'(NUSER - 1)) ? '0 : win_idx + 1'b1;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
