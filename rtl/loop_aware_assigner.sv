// loop_aware_assigner - loop-aware coarse-grain assignment of instructions
// to domains.
//
// Instructions arrive one per cycle (at most) in profiled execution order.
// Each is given to the current domain, and a counter S_curr of the
// instructions in that domain is kept. A domain holds at most S_MAX
// instructions; when it is full the next instruction opens the next domain.
//
// Loop awareness (enabled by loop_aware_en): the first instruction of a
// loop comes with the loop's static size S_loop. If the loop fits in what
// is left of the current domain (S_loop <= S_MAX - S_curr), or is larger
// than any domain (S_loop > S_MAX), assignment goes on in the current
// domain. Otherwise (S_MAX - S_curr < S_loop <= S_MAX) the current domain
// is closed and the whole loop starts in a new domain, so that it is not
// split. With loop_aware_en low the unit is the plain sequential fill.
//
// Interface and timing: in_valid / in_loop_head / in_loop_size are sampled
// on a clock edge; one cycle later out_valid presents the domain number of
// that instruction, out_new_domain whether it opened a new domain and
// out_loop_split_avoided whether that was because of the loop rule. s_curr
// is the occupancy of the current domain after the last assignment.
//
// The rule, S_MAX = 512 and the sequential fill follow the scheduling
// scheme. A loop exactly S_MAX long, and a loop exactly filling the rest of
// the domain, fall between the scheme's cases; here the first opens a new
// domain and the second stays. Domain numbers wrap at 2^DOM_W.
module loop_aware_assigner #(
  parameter int unsigned S_MAX  = 512,  // instructions per domain
  parameter int unsigned DOM_W  = 8,    // domain number width
  parameter int unsigned SIZE_W = 16    // loop size width
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               loop_aware_en,
  input  logic               in_valid,
  input  logic               in_loop_head,
  input  logic [SIZE_W-1:0]  in_loop_size,
  output logic               out_valid,
  output logic [DOM_W-1:0]   out_domain,
  output logic               out_new_domain,
  output logic               out_loop_split_avoided,
  output logic [SIZE_W-1:0]  s_curr
);

  logic [SIZE_W-1:0] scur_q;
  logic [DOM_W-1:0]  dom_q;
  logic              started_q;   // an instruction has been placed
  logic              full, loop_move, open_new;
  logic [SIZE_W-1:0] room;

  always_comb begin
    room      = SIZE_W'(S_MAX) - scur_q;
    full      = (scur_q >= SIZE_W'(S_MAX));
    loop_move = loop_aware_en && in_loop_head && (scur_q != '0)
                && (in_loop_size > room) && (in_loop_size <= SIZE_W'(S_MAX));
    open_new  = started_q && (full || loop_move);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scur_q                 <= '0;
      dom_q                  <= '0;
      started_q              <= 1'b0;
      out_valid              <= 1'b0;
      out_domain             <= '0;
      out_new_domain         <= 1'b0;
      out_loop_split_avoided <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        started_q              <= 1'b1;
        out_new_domain         <= open_new;
        out_loop_split_avoided <= open_new && loop_move && !full;
        if (open_new) begin
          dom_q      <= dom_q + 1'b1;
          out_domain <= dom_q + 1'b1;
          scur_q     <= SIZE_W'(1);
        end else begin
          out_domain <= dom_q;
          scur_q     <= scur_q + 1'b1;
        end
      end
    end
  end

  assign s_curr = scur_q;

endmodule
