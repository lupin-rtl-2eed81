// lupin_controller: sequences one activation block through the Lupin array.
//
// A run has three phases.
//   LOAD     The BSI decoder produces the block's HP_EN bits row by row. For
//            every row it presents, the controller reads the same row from the
//            activation buffer; one cycle later (the buffer's read latency) the
//            row's pair bytes and its HP_EN bits are written into the array
//            together. Outlier decoding thus runs in parallel with loading.
//   COMPUTE  One weight vector is issued per cycle, n_vec in all, with no gaps:
//            outliers never stall the array, since every pair format finishes in
//            one cycle in the paired MAC units.
//   DRAIN    The controller waits until the output buffer has written all n_vec
//            result rows, then pulses done.
// start is taken only when idle. n_vec = 0 loads the block and ends. acc_mode is
// latched at start and held for the output buffer during the run.
//
// The three phases, the overlap of index decoding with block loading and the
// stall-free issue follow the published architecture; the state machine itself
// is this design's own.
module lupin_controller
  import lupin_pkg::*;
#(
  parameter int unsigned ROWS     = 16,
  parameter int unsigned COLS     = 16,
  parameter int unsigned WB_DEPTH = 64,
  localparam int unsigned PAIRS  = COLS / 2,
  localparam int unsigned ROW_W  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned ADDR_W = $clog2(WB_DEPTH),
  localparam int unsigned NV_W   = $clog2(WB_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              start,
  input  logic [NV_W-1:0]   n_vec,
  input  logic              acc_mode_i,
  output logic              busy,
  output logic              done,
  // BSI decoder
  output logic              dec_start,
  input  logic              dec_row_valid,
  input  logic [ROW_W-1:0]  dec_row_idx,
  input  hp_en_t            dec_row_hp [PAIRS],
  input  logic              dec_done,
  // activation buffer read
  output logic              act_rd_en,
  output logic [ROW_W-1:0]  act_rd_row,
  // array load (data comes straight from the activation buffer)
  output logic              arr_ld_en,
  output logic [ROW_W-1:0]  arr_ld_row,
  output hp_en_t            arr_ld_hp [PAIRS],
  // weight issue, shared by the weight and output buffers
  output logic              issue,
  output logic [ADDR_W-1:0] issue_addr,
  output logic              acc_mode_o,
  // output buffer
  input  logic              out_wr_valid,
  // phase indicators
  output logic              in_load,
  output logic              in_compute
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_COMPUTE, S_DRAIN} state_e;

  state_e            state_q;
  logic [NV_W-1:0]   nvec_q;
  logic [NV_W-1:0]   issued_q;
  logic [NV_W-1:0]   written_q;
  logic              acc_q;
  logic              ld_en_q;
  logic [ROW_W-1:0]  ld_row_q;
  hp_en_t            ld_hp_q [PAIRS];

  assign dec_start  = (state_q == S_IDLE) && start;
  assign act_rd_en  = (state_q == S_LOAD) && dec_row_valid;
  assign act_rd_row = dec_row_idx;
  assign issue      = (state_q == S_COMPUTE);
  assign issue_addr = ADDR_W'(issued_q);
  assign busy       = (state_q != S_IDLE);
  assign acc_mode_o = acc_q;
  assign in_load    = (state_q == S_LOAD);
  assign in_compute = (state_q == S_COMPUTE);
  assign arr_ld_en  = ld_en_q;
  assign arr_ld_row = ld_row_q;
  assign arr_ld_hp  = ld_hp_q;

  logic [NV_W-1:0] written_next;
  assign written_next = written_q + NV_W'(out_wr_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      nvec_q    <= '0;
      issued_q  <= '0;
      written_q <= '0;
      acc_q     <= 1'b0;
      ld_en_q   <= 1'b0;
      ld_row_q  <= '0;
      for (int p = 0; p < PAIRS; p++) ld_hp_q[p] <= '0;
      done      <= 1'b0;
    end else begin
      done     <= 1'b0;
      ld_en_q  <= act_rd_en;
      ld_row_q <= dec_row_idx;
      ld_hp_q  <= dec_row_hp;
      written_q <= written_next;
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q   <= S_LOAD;
          nvec_q    <= n_vec;
          acc_q     <= acc_mode_i;
          issued_q  <= '0;
          written_q <= '0;
        end
        S_LOAD: if (dec_done) begin
          if (nvec_q == '0) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            state_q <= S_COMPUTE;
          end
        end
        S_COMPUTE: begin
          issued_q <= issued_q + NV_W'(1);
          if (issued_q + NV_W'(1) == nvec_q) state_q <= S_DRAIN;
        end
        S_DRAIN: if (written_next == nvec_q) begin
          state_q <= S_IDLE;
          done    <= 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Results are only written for vectors this run issued.
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_wr_valid |-> (written_q < nvec_q))
    else $error("output row written beyond the issued vectors");
  // The decoder is only active while loading.
  assert property (@(posedge clk) disable iff (!rst_n)
                   dec_row_valid |-> (state_q == S_LOAD))
    else $error("HP_EN row delivered outside the load phase");

endmodule
