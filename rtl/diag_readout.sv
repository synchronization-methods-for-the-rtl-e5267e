// Diagnostic readout: a snapshot memory that records a device's data streams
// BX by BX so that software can read them back.
//
// Recording the input words with their received time signature next to the
// local time signature and the output words shows at once which data delay
// or BC0 delay makes the two signatures agree, and what the latency of the
// transmission and processing is. The source describes only this use; the
// form below (one-shot recording of DEPTH consecutive BX into a RAM, then
// random-access reading) is this design's own.
//
// Interface: a pulse on start_i (also during a recording) restarts
// recording at address 0 in the next BX; sample i of the snapshot is data_i
// of the i-th BX after start_i. busy_o is high while recording, done_o once
// the DEPTH samples are stored (until the next start_i). rd_data is the
// word at rd_addr, registered (one clock of read latency).
module diag_readout #(
  parameter int unsigned W  = 53,
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  input  logic [W-1:0]  data_i,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  output logic          busy_o,
  output logic          done_o
);

  localparam int unsigned DEPTH = 1 << AW;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr   <= '0;
      busy_o <= 1'b0;
      done_o <= 1'b0;
    end else if (start_i) begin
      wptr   <= '0;
      busy_o <= 1'b1;
      done_o <= 1'b0;
    end else if (busy_o) begin
      wptr <= wptr + 1'b1;
      if (wptr == AW'(DEPTH - 1)) begin
        busy_o <= 1'b0;
        done_o <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (busy_o && !start_i) mem[wptr] <= data_i;
    rd_data <= mem[rd_addr];
  end

endmodule
