// error_response_controller: read issue, retirement and replay for the
// resilient register file.
//
// Reads are accepted with a valid/ready handshake (req_valid, req_ready,
// req_addr) and issued to the array (iss_valid, iss_addr) at the next rising
// edge. A read issued at edge k has its compacted timing error flag (err) two
// edges later, at k+2: the controller keeps the issued reads in a 3-stage
// shift register and retires the oldest one (ret_valid, ret_addr) when its
// flag is clear. When it is set, the read and the up to two younger reads
// behind it (whose data may have been disturbed by the late one) are squashed,
// queued, and replayed in order, one at a time with the pipeline drained in
// between, while replay_active requests slower clock (f_half, replay_mode = 0)
// or raised supply (v_boost, replay_mode = 1). A replayed read that fails
// again is queued again. New requests wait (req_ready = 0) until the queue is
// empty and the last replayed read has retired. err_evt pulses for each
// detected error (input to the error rate tracker).
// Replay at F/2 or higher supply follows the published scheme; the squash
// depth, the one-at-a-time replay and the handshake are this design's choices.
module error_response_controller #(
  parameter int unsigned AW = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          replay_mode,
  input  logic          req_valid,
  input  logic [AW-1:0] req_addr,
  output logic          req_ready,
  output logic          iss_valid,
  output logic [AW-1:0] iss_addr,
  input  logic          err,
  output logic          ret_valid,
  output logic [AW-1:0] ret_addr,
  output logic          err_evt,
  output logic          replay_active,
  output logic          f_half,
  output logic          v_boost
);
  timeunit 1ps;
  timeprecision 1ps;

  typedef struct packed {
    logic          v;
    logic [AW-1:0] a;
  } rd_t;

  localparam int unsigned DEPTH = 3;

  rd_t                       pipe  [DEPTH];   // [0] newest, [DEPTH-1] retiring
  rd_t                       queue [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] q_cnt;
  logic                      flush;
  logic                      pipe_empty;
  rd_t                       issue;

  assign flush      = pipe[DEPTH-1].v && err;
  assign pipe_empty = !pipe[0].v && !pipe[1].v && !pipe[2].v;

  // Issue: replay queue head when the pipeline is empty, else new requests.
  always_comb begin
    issue     = '0;
    req_ready = 1'b0;
    if (!flush) begin
      if (q_cnt != 0) begin
        if (pipe_empty) issue = queue[0];
      end else if (!replay_active) begin
        req_ready = 1'b1;
        issue     = '{v: req_valid, a: req_addr};
      end
    end
  end

  assign iss_valid = issue.v;
  assign iss_addr  = issue.a;
  assign ret_valid = pipe[DEPTH-1].v && !err;
  assign ret_addr  = pipe[DEPTH-1].a;
  assign err_evt   = flush;
  assign f_half    = replay_active && !replay_mode;
  assign v_boost   = replay_active &&  replay_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        pipe[i]  <= '0;
        queue[i] <= '0;
      end
      q_cnt         <= '0;
      replay_active <= 1'b0;
    end else if (flush) begin
      // Oldest first: squashed in-flight reads, then what was still queued.
      automatic rd_t                        nq [DEPTH];
      automatic int unsigned                n = 0;
      for (int i = 0; i < DEPTH; i++) nq[i] = '0;
      for (int i = DEPTH-1; i >= 0; i--) begin
        if (pipe[i].v && n < DEPTH) begin
          nq[n] = pipe[i];
          n++;
        end
      end
      for (int i = 0; i < DEPTH; i++) begin
        if (i < int'(q_cnt) && n < DEPTH) begin
          nq[n] = queue[i];
          n++;
        end
      end
      for (int i = 0; i < DEPTH; i++) begin
        queue[i] <= nq[i];
        pipe[i]  <= '0;
      end
      q_cnt         <= n[$clog2(DEPTH+1)-1:0];
      replay_active <= 1'b1;
    end else begin
      pipe[0] <= issue;
      for (int i = 1; i < DEPTH; i++) pipe[i] <= pipe[i-1];
      if (q_cnt != 0 && pipe_empty) begin
        for (int i = 0; i < DEPTH-1; i++) queue[i] <= queue[i+1];
        queue[DEPTH-1] <= '0;
        q_cnt          <= q_cnt - 1'b1;
      end
      // Replay ends when the queue is empty and the last replayed read retires.
      if (replay_active && q_cnt == 0 && !pipe[0].v && !pipe[1].v &&
          (!pipe[2].v || !err))
        replay_active <= 1'b0;
    end
  end

  // The retiring read is always the oldest issued: no stage may skip.
  assert property (@(posedge clk) disable iff (!rst_n) flush |=> !pipe[0].v)
    else $error("read issued in the cycle of a flush");
endmodule
