// Phase optimisation: greedy search for the {0,1} phase sequence with the
// lowest PAPR, using Q comparisons, then output of the optimised symbol.
//
// Search (follows the published design): the weight of subblock q is (-1)^w_q. The
// PAPR of w = 0...0 is measured first. Then, for q = 1..Q in turn, the
// candidate that equals the best sequence so far with w_q flipped is
// measured; the flip is kept only when the candidate's PAPR is strictly
// lower, otherwise all sequences with that w_q are dropped. For Q = 3 this is
// 000 against 100, then the survivor against the survivor with w_2 flipped,
// and so on, over the eight candidates 000..111. Q + 1 PAPR measurements
// are made per symbol.
//
// Implementation (this design's own sequencing): each measurement is one
// pass over the symbol held in the subblock interleaver. The controller
// clears the PAPR calculator, steps the interleaver read position j through
// 0..N-1 with rd_en high, and sends each set of Q interleaved samples, one cycle later,
// through the phase sequence generator and the optimisation block into the
// PAPR calculator; it then waits for the result. After the last comparison a
// final pass with the chosen sequence streams the combined samples out
// (out_valid, out_last on the last one) with the chosen sequence on index,
// and release frees the interleaver for the next symbol.
//
// Timing per symbol: (Q + 2) passes of N + 2 cycles plus Q + 1 PAPR
// latencies (about 65 cycles each). index[q] is w_(q+1) and stays valid until
// the next symbol's output. papr_valid pulses with the PAPR of every
// candidate measured (UQ8.8 dB on papr_db).
module phase_optimizer
  import sbi_pkg::*;
#(
  parameter int N = 256,
  parameter int Q = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 full,
  output logic                 release_o,
  output logic                 rd_en,
  output logic [$clog2(N)-1:0] rd_addr,
  input  cplx_t                rd_s [Q],
  output logic                 out_valid,
  output xcplx_t               out_s,
  output logic                 out_last,
  output logic [Q-1:0]         index,
  output logic                 papr_valid,
  output logic [DBW-1:0]       papr_db,
  output logic                 flip_kept     // a flip lowered the PAPR
);
  localparam int AW = $clog2(N);
  localparam int CW = $clog2(Q + 2);

  typedef enum logic [2:0] {WAIT, START, READ, RESULT, OUT_READ, DONE} state_t;
  state_t state;

  logic [Q-1:0]   best, w_try;
  logic [DBW-1:0] best_papr;
  logic [CW-1:0]  cand;            // 0: all zero, c: w_c flipped
  logic           reading, rd_valid, rd_last_q, rd_last, out_pass;
  logic           papr_start, papr_done;
  logic [DBW-1:0] papr_res;
  weight_t        weights [Q];
  xcplx_t         comb;

  phase_sequence_gen #(.Q(Q)) u_phase (
    .phase_in (w_try),
    .phase_out(weights)
  );

  optimisation_block #(.Q(Q)) u_opt (
    .x_s  (rd_s),
    .phase(weights),
    .y    (comb)
  );

  papr_calc #(.N(N)) u_papr (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (papr_start),
    .in_valid(rd_valid && !out_pass),
    .in_s    (comb),
    .done    (papr_done),
    .papr_db (papr_res)
  );

  assign reading    = (state == READ) || (state == OUT_READ);
  assign papr_start = (state == START);
  assign out_valid  = rd_valid && out_pass;
  assign out_s      = comb;
  assign out_last   = out_valid && rd_last;
  assign papr_valid = papr_done;
  assign papr_db    = papr_res;
  assign release_o  = (state == DONE);
  assign rd_en      = reading;

  // Read data arrive one cycle after the address.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_last  <= 1'b0;
    end else begin
      rd_valid <= reading;
      rd_last  <= reading && (rd_addr == AW'(N - 1));
    end
  end
  assign rd_last_q = (rd_addr == AW'(N - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= WAIT;
      rd_addr   <= '0;
      best      <= '0;
      w_try     <= '0;
      best_papr <= '0;
      cand      <= '0;
      index     <= '0;
      out_pass  <= 1'b0;
      flip_kept <= 1'b0;
    end else begin
      flip_kept <= 1'b0;
      unique case (state)
        WAIT: if (full) begin
          best     <= '0;
          w_try    <= '0;
          cand     <= '0;
          out_pass <= 1'b0;
          state    <= START;
        end
        START: begin
          rd_addr <= '0;
          state   <= READ;
        end
        READ: begin
          rd_addr <= rd_addr + 1'b1;
          if (rd_last_q) state <= RESULT;
        end
        RESULT: if (papr_done) begin
          logic [Q-1:0] nbest;
          nbest = best;
          if (cand == '0) begin
            best_papr <= papr_res;
          end else if (papr_res < best_papr) begin
            nbest     = w_try;
            best_papr <= papr_res;
            flip_kept <= 1'b1;
          end
          best <= nbest;
          cand <= cand + 1'b1;
          if (cand == CW'(Q)) begin
            w_try    <= nbest;
            index    <= nbest;
            out_pass <= 1'b1;
            rd_addr  <= '0;
            state    <= OUT_READ;
          end else begin
            w_try <= nbest ^ (Q'(1) << cand);
            state <= START;
          end
        end
        OUT_READ: begin
          rd_addr <= rd_addr + 1'b1;
          if (rd_last_q) state <= DONE;
        end
        DONE: begin
          // wait one cycle so the last sample leaves before the release
          if (!rd_valid) begin
            out_pass <= 1'b0;
            state    <= WAIT;
          end
        end
        default: state <= WAIT;
      endcase
    end
  end

endmodule
