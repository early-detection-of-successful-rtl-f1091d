// ed_ctrl: sequencer of one early-detection check.
//
// On `start` (accepted only when idle) it clears the accumulator and walks
// the data columns 0..kb-1: each cycle it reads one column of Hb_s and the
// matching hard-decision word, and one cycle later (the memories have a
// registered read) tells the accumulator to fold that column in. After the
// data columns it reads the p0 word (hard-decision address kb) and has it
// added unrotated. `done` is a one-cycle pulse when the accumulator holds the
// complete left-hand side of the check equation.
//
// Timing: with `start` sampled in cycle 0, reads are issued in cycles 0..kb,
// folds happen at the ends of cycles 1..kb+1, and `done` is high in cycle
// kb+2, so one check takes kb+3 cycles from start to done inclusive. `busy`
// is high from the cycle after start up to and including the done cycle.
// The published method does not describe the check's schedule; this column-serial
// order is this design's choice. Active-low synchronous reset.
module ed_ctrl #(
  parameter int unsigned KB_MAX = ed_pkg::KB_MAX,
  parameter int unsigned NB_MAX = ed_pkg::NB_MAX,
  parameter int unsigned KB_W   = $clog2(KB_MAX + 1),
  parameter int unsigned COL_W  = $clog2(KB_MAX),
  parameter int unsigned ADDR_W = $clog2(NB_MAX)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [KB_W-1:0]   kb,        // data columns of the code in use, >= 1
  output logic              hb_rd_en,  // read a column of Hb_s
  output logic [COL_W-1:0]  hb_rd_col,
  output logic              hd_rd_en,  // read a hard-decision word
  output logic [ADDR_W-1:0] hd_rd_addr,
  output logic              acc_clr,
  output logic              acc_en,
  output logic              acc_raw,
  output logic              busy,
  output logic              done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_FIN} state_t;

  state_t          state;
  logic [KB_W-1:0] cnt;       // column being read in S_RUN
  logic            v_q;       // read data of the previous cycle is valid
  logic            raw_q;     // ... and is the p0 word
  logic            issue;     // a read is issued this cycle
  logic [KB_W-1:0] addr;      // column / word address issued this cycle
  logic            is_p0;

  always_comb begin
    issue = 1'b0;
    addr  = '0;
    unique case (state)
      S_IDLE: begin issue = start; addr = '0;  end
      S_RUN:  begin issue = 1'b1;  addr = cnt; end
      default: ;
    endcase
    is_p0      = issue && (addr == kb);
    hd_rd_en   = issue;
    hd_rd_addr = ADDR_W'(addr);
    hb_rd_en   = issue && !is_p0;
    hb_rd_col  = COL_W'(addr);
    acc_clr    = (state == S_IDLE) && start;
    acc_en     = v_q;
    acc_raw    = raw_q;
    busy       = (state != S_IDLE);
    done       = (state == S_FIN);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      v_q   <= 1'b0;
      raw_q <= 1'b0;
    end else begin
      v_q   <= issue;
      raw_q <= is_p0;
      unique case (state)
        S_IDLE:  if (start) begin
                   state <= S_RUN;
                   cnt   <= KB_W'(1);
                 end
        S_RUN:   if (cnt == kb) state <= S_DRAIN;
                 else           cnt   <= cnt + 1'b1;
        S_DRAIN: state <= S_FIN;
        S_FIN:   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A check needs at least one data column and no more than the maximum.
  always_ff @(posedge clk) begin
    if (rst_n && state == S_IDLE && start)
      assert (kb >= 1 && kb <= KB_W'(KB_MAX))
        else $error("ed_ctrl: kb=%0d out of range", kb);
  end

endmodule
