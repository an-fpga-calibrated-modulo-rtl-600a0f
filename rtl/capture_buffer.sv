// capture_buffer: on-chip sample memory for observing the loop in real time.
//
// A pulse on arm_i clears the write pointer and starts a capture: the next
// DEPTH words offered with in_valid_i are written to consecutive addresses, at
// up to one word per clock, after which done_o is set and stays set until the
// next arm. busy_o is high while capturing. A synchronous read port with one
// cycle of latency (rd_addr_i -> rd_data_o) lets the stored record be read out
// at any time; the array has no reset so that it maps to block RAM.
//
// The default depth of 50,000 samples is the record length of the on-board
// acquisition shown for this platform; the word layout (folded sample above the
// reconstructed value) and the arm/done handshake are this design's choices.
module capture_buffer #(
  parameter int DEPTH = 50000,
  parameter int W     = 32,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          arm_i,
  input  logic          in_valid_i,
  input  logic [W-1:0]  in_data_i,
  output logic          busy_o,
  output logic          done_o,
  input  logic [AW-1:0] rd_addr_i,
  output logic [W-1:0]  rd_data_o
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr_q;
  logic          we;

  assign we = busy_o && in_valid_i && !arm_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wr_ptr_q <= '0;
      busy_o   <= 1'b0;
      done_o   <= 1'b0;
    end else if (arm_i) begin
      wr_ptr_q <= '0;
      busy_o   <= 1'b1;
      done_o   <= 1'b0;
    end else if (we) begin
      if (wr_ptr_q == AW'(DEPTH - 1)) begin
        busy_o <= 1'b0;
        done_o <= 1'b1;
      end
      wr_ptr_q <= wr_ptr_q + 1'b1;
    end
  end

  always_ff @(posedge clk_i) begin
    if (we) mem[wr_ptr_q] <= in_data_i;
    rd_data_o <= mem[rd_addr_i];
  end

endmodule
