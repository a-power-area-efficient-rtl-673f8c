// dispatch_queue: two exchangeable vertex-cache-entry buffers.
//
// The producer (primitive input control or subdivision control) fills one
// DEPTH-entry buffer while the vertex processing unit drains the other, so
// both sides work at the same time. A filling buffer is handed to the reader
// when it is full, or when the producer pushes nothing in a cycle and the
// reader has nothing left to drain; the buffers then swap roles. A buffer
// returns to the producer once the reader has emptied it.
// push/push_ready and pop/pop_valid are valid-ready handshakes; the head
// entry is shown on pop_data. Two buffers of six 5-bit entries follow the
// document; the hand-over rule is this design's choice.
module dispatch_queue
  import ge_pkg::*;
#(
  parameter int unsigned DEPTH = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  ent_t push_data,
  output logic push_ready,
  input  logic pop,
  output ent_t pop_data,
  output logic pop_valid,
  output logic idle             // both buffers empty
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  ent_t        buf_q [2][DEPTH];
  logic [CW-1:0] cnt [2];       // entries written
  logic [CW-1:0] rdp [2];       // entries read
  logic        full_q [2];      // handed to the reader
  logic        wsel, rsel;

  logic do_push, do_pop, hand;
  assign push_ready = !full_q[wsel];
  assign do_push    = push && push_ready;
  assign pop_valid  = full_q[rsel] && (rdp[rsel] != cnt[rsel]);
  assign pop_data   = buf_q[rsel][rdp[rsel][$clog2(DEPTH)-1:0]];
  assign do_pop     = pop && pop_valid;
  assign idle       = !full_q[0] && !full_q[1] && cnt[0] == '0 && cnt[1] == '0;

  always_comb begin
    hand = 1'b0;
    if (!full_q[wsel]) begin
      if (do_push && cnt[wsel] == CW'(DEPTH - 1)) hand = 1'b1;
      else if (!push && cnt[wsel] != '0 && !full_q[!wsel]) hand = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++) begin
        cnt[b] <= '0; rdp[b] <= '0; full_q[b] <= 1'b0;
      end
      wsel <= 1'b0; rsel <= 1'b0;
    end else begin
      if (do_push) begin
        buf_q[wsel][cnt[wsel][$clog2(DEPTH)-1:0]] <= push_data;
        cnt[wsel] <= cnt[wsel] + 1'b1;
      end
      if (hand) begin
        full_q[wsel] <= 1'b1;
        wsel <= !wsel;
      end
      if (do_pop) begin
        if (rdp[rsel] + 1'b1 == cnt[rsel]) begin
          full_q[rsel] <= 1'b0;
          cnt[rsel]    <= '0;
          rdp[rsel]    <= '0;
          rsel         <= !rsel;
        end else begin
          rdp[rsel] <= rdp[rsel] + 1'b1;
        end
      end
    end
  end

  a_push_ready: assert property (@(posedge clk) disable iff (!rst_n) do_push |-> !full_q[wsel]);
endmodule
