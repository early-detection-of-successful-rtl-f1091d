// stop_ctrl: iteration stopping rule of the decoder. After every decoding
// iteration the decoder reports `iter_done`; this block then launches one
// early-detection check. If the check passes, decoding of the block stops at
// once with `decoded` set. If it fails and the iteration limit (MAX_ITER, 15
// in the published evaluation) has been reached, decoding stops with
// `decoded` clear; otherwise `next_iter` tells the decoder to run another
// iteration.
//
// Interface: `frame_start` begins a new code block (clears the iteration
// count). `check_start` is a combinational one-cycle pulse on the cycle
// iter_done is accepted. `stop` and `next_iter` are registered one-cycle
// pulses issued on the cycle after `check_done`. `decoded` and `iter_count`
// hold their values until the next frame_start. An `iter_done` that arrives
// while a check is pending, or after the block has stopped, is ignored.
// Active-low synchronous reset. The handshake is this design's choice; the
// published method only states that the decoder stops as soon as the check holds.
module stop_ctrl #(
  parameter int unsigned MAX_ITER = ed_pkg::MAX_ITER,
  parameter int unsigned IT_W     = $clog2(MAX_ITER + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            frame_start,
  input  logic            iter_done,
  input  logic            check_done,
  input  logic            check_ok,
  output logic            check_start,
  output logic            next_iter,
  output logic            stop,
  output logic            decoded,
  output logic [IT_W-1:0] iter_count
);

  logic active;   // a block is being decoded
  logic waiting;  // a check is running

  assign check_start = iter_done && active && !waiting;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active     <= 1'b0;
      waiting    <= 1'b0;
      next_iter  <= 1'b0;
      stop       <= 1'b0;
      decoded    <= 1'b0;
      iter_count <= '0;
    end else begin
      next_iter <= 1'b0;
      stop      <= 1'b0;
      if (frame_start) begin
        active     <= 1'b1;
        waiting    <= 1'b0;
        decoded    <= 1'b0;
        iter_count <= '0;
      end else if (check_start) begin
        waiting    <= 1'b1;
        iter_count <= iter_count + 1'b1;
      end else if (waiting && check_done) begin
        waiting <= 1'b0;
        if (check_ok) begin
          stop    <= 1'b1;
          decoded <= 1'b1;
          active  <= 1'b0;
        end else if (iter_count >= IT_W'(MAX_ITER)) begin
          stop    <= 1'b1;
          active  <= 1'b0;
        end else begin
          next_iter <= 1'b1;
        end
      end
    end
  end

endmodule
