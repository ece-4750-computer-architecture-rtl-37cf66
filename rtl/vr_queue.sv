// Small valid/ready FIFO used to decouple network terminals.
//
// DEPTH entries of msg_t held in a circular buffer.  enq_rdy is high while
// an entry is free and deq_val while one is held; a message enqueued in a
// cycle can be dequeued from the next cycle on (one cycle latency, no
// combinational path from enq to deq or from deq_rdy to enq_rdy).  Reset
// empties the queue.
module vr_queue #(
  parameter type         msg_t = logic [31:0],
  parameter int unsigned DEPTH = 2
) (
  input  logic clk,
  input  logic reset,
  input  logic enq_val,
  output logic enq_rdy,
  input  msg_t enq_msg,
  output logic deq_val,
  input  logic deq_rdy,
  output msg_t deq_msg
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  msg_t          buf_q [DEPTH];
  logic [PW-1:0] head_q, tail_q;
  logic [PW:0]   count_q;

  wire do_enq = enq_val && enq_rdy;
  wire do_deq = deq_val && deq_rdy;

  assign enq_rdy = (count_q != (PW+1)'(DEPTH));
  assign deq_val = (count_q != '0);
  assign deq_msg = buf_q[head_q];

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      if (do_enq) begin
        buf_q[tail_q] <= enq_msg;
        tail_q        <= incr(tail_q);
      end
      if (do_deq) head_q <= incr(head_q);
      case ({do_enq, do_deq})
        2'b10:   count_q <= count_q + 1'b1;
        2'b01:   count_q <= count_q - 1'b1;
        default: ;
      endcase
    end
  end
endmodule
