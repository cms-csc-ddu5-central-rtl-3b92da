// sr_onehot: serial-in parallel-out shift register that resets to a single
// one (the SR4CE / SR8CE macros).
//
// On reset q holds 1 in bit 0 and zeros elsewhere; each clock with ce high
// shifts q up by one place and takes sli into bit 0. Feeding q[W-1] back
// into sli makes a one-hot ring that steps a sequence of W states. The 4-bit
// macro loads the one on a synchronous reset and the 8-bit macro on an
// asynchronous clear; ASYNC selects which.
module sr_onehot #(
  parameter int unsigned W     = 4,
  parameter bit          ASYNC = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,
  input  logic         sli,
  output logic [W-1:0] q
);
  localparam logic [W-1:0] ONE = W'(1);
  if (ASYNC) begin : g_async
    always_ff @(posedge clk or posedge rst)
      if (rst)     q <= ONE;
      else if (ce) q <= {q[W-2:0], sli};
  end else begin : g_sync
    always_ff @(posedge clk)
      if (rst)     q <= ONE;
      else if (ce) q <= {q[W-2:0], sli};
  end
endmodule
