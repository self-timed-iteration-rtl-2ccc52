// io_element: I/O stage joining two self-timed loops.
//
// Sits in a loop like an ordinary stage (input x from the predecessor, output
// y to the successor) and performs one of two operations, chosen by bit
// MODE_BIT of its input value:
//   copy     (mode bit 0): y := x, the loops iterate independently;
//   exchange (mode bit 1): x is offered to the other loop's I/O element on
//            tx; once the other element's value has arrived (rx valid) it
//            is passed on as y := rx.
// tx is x gated by the mode bit's true rail (so tx[MODE_BIT].t is simply
// x[MODE_BIT].t), so it is valid only during an
// exchange and returns to reset with x. y returns to reset once x is reset
// and the successor holds the new value, and, after an exchange, also once rx
// has returned to reset, so a stale rx is never taken for the next value. The
// last operation is remembered in a small latch (xm). No arbitration is
// needed: each element simply waits for a valid value. Both loops must
// request exchanges in the same revolution or the requesting loop waits.
//
// The mode-bit position and the gating of tx are choices of this
// implementation. rst_n (active low, asynchronous) resets y and xm.
module io_element
  import st_pkg::*;
#(
  parameter int unsigned W        = 8,
  parameter int unsigned MODE_BIT = W - 1
) (
  input  logic           rst_n,
  input  dr_t  [W-1:0]   x,
  input  logic           succ_valid,
  input  logic           succ_rst,
  input  dr_t  [W-1:0]   rx,
  output dr_t  [W-1:0]   tx,
  output dr_t  [W-1:0]   y
);

  logic x_valid, x_rst, rx_valid, rx_rst;
  logic eval_copy, eval_xchg, rst_cond, xm;

  dr_completion #(.W(W)) u_cx  (.x(x),  .valid(x_valid),  .rst(x_rst));
  dr_completion #(.W(W)) u_crx (.x(rx), .valid(rx_valid), .rst(rx_rst));

  always_comb begin
    for (int i = 0; i < W; i++) begin
      tx[i].t = x[i].t & x[MODE_BIT].t;
      tx[i].f = x[i].f & x[MODE_BIT].t;
    end
  end

  assign eval_copy = x_valid & x[MODE_BIT].f & succ_rst;
  assign eval_xchg = x_valid & x[MODE_BIT].t & rx_valid & succ_rst;
  assign rst_cond  = x_rst & succ_valid & (~xm | rx_rst);

  always_latch begin
    if (!rst_n)                      xm = 1'b0;
    else if (eval_copy | eval_xchg)  xm = eval_xchg;
  end

  always_latch begin
    if (!rst_n)         y = '0;
    else if (eval_copy) y = x;
    else if (eval_xchg) y = rx;
    else if (rst_cond)  y = '0;
  end

endmodule
