// lupin_output_buffer: removes the column skew of the array's results and
// stores one output row per weight vector.
//
// Column c of the array delivers the result for a weight vector issued in cycle
// t in cycle t + ROWS + 2 + c. The buffer delays column c by COLS-1-c cycles, so
// the whole row lines up in cycle t + ROWS + COLS + 1, and carries the issue
// flag and the vector's address down a matching delay line. In that cycle row
// issue_addr is written: overwritten, or, with acc_mode high, added to what the
// row already holds. acc_mode lets a layer whose reduction length exceeds ROWS
// be summed over several activation blocks. wr_valid pulses with every row
// written. The host reads whole rows, synchronously, through rd_addr/rd_data.
//
// The buffer's place below the array follows the published block diagram; the
// deskew, the accumulate option, the depth and the 32-bit results are this
// design's own.
module lupin_output_buffer #(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned COLS  = 16,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned ACC_W = 24,
  parameter int unsigned OUT_W = 32,
  localparam int unsigned ADDR_W = $clog2(DEPTH),
  localparam int unsigned LAT    = ROWS + COLS + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    acc_mode,
  input  logic                    issue,
  input  logic [ADDR_W-1:0]       issue_addr,
  input  logic signed [ACC_W-1:0] psum_i  [COLS],
  output logic                    wr_valid,
  input  logic [ADDR_W-1:0]       rd_addr,
  output logic signed [OUT_W-1:0] rd_data [COLS]
);

  // issue flag and address delay line
  logic              v_q [LAT];
  logic [ADDR_W-1:0] a_q [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LAT; k++) begin
        v_q[k] <= 1'b0;
        a_q[k] <= '0;
      end
    end else begin
      v_q[0] <= issue;
      a_q[0] <= issue_addr;
      for (int k = 1; k < LAT; k++) begin
        v_q[k] <= v_q[k-1];
        a_q[k] <= a_q[k-1];
      end
    end
  end

  // column deskew: column c passes through COLS-1-c registers
  logic signed [ACC_W-1:0] aligned [COLS];
  assign aligned[COLS-1] = psum_i[COLS-1];
  for (genvar c = 0; c < COLS - 1; c++) begin : g_deskew
    localparam int unsigned D = COLS - 1 - c;
    logic signed [ACC_W-1:0] dly_q [D];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < D; k++) dly_q[k] <= '0;
      end else begin
        dly_q[0] <= psum_i[c];
        for (int k = 1; k < D; k++) dly_q[k] <= dly_q[k-1];
      end
    end
    assign aligned[c] = dly_q[D-1];
  end

  assign wr_valid = v_q[LAT-1];

  logic signed [OUT_W-1:0] mem [DEPTH][COLS];

  always_ff @(posedge clk) begin
    if (wr_valid) begin
      for (int c = 0; c < COLS; c++) begin
        mem[a_q[LAT-1]][c] <= (acc_mode ? mem[a_q[LAT-1]][c] : '0) + OUT_W'(aligned[c]);
      end
    end
    for (int c = 0; c < COLS; c++) rd_data[c] <= mem[rd_addr][c];
  end

endmodule
