// TDMA receiver for one FPGA-to-FPGA link.
// Steers each valid link word to the output of the stream named on the
// control lines (link_sid). There is no back-pressure: the TDMA schedule
// reserves each stream's bandwidth at design time, so the consumer must take
// a word in the cycle it appears. Outputs are registered (one clock latency).
// The steering by control lines follows the source; the register stage is
// this design's choice.
module tdma_rx #(
  parameter int unsigned NSTREAMS = 2,
  parameter int unsigned DW       = 64,
  localparam int unsigned SW = (NSTREAMS > 1) ? $clog2(NSTREAMS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DW-1:0]       link_data,
  input  logic                link_valid,
  input  logic [SW-1:0]       link_sid,
  output logic [NSTREAMS-1:0] m_valid,
  output logic [DW-1:0]       m_data [NSTREAMS]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= '0;
      for (int s = 0; s < NSTREAMS; s++) m_data[s] <= '0;
    end else begin
      for (int s = 0; s < NSTREAMS; s++) begin
        m_valid[s] <= link_valid && (link_sid == SW'(s));
        if (link_valid && (link_sid == SW'(s))) m_data[s] <= link_data;
      end
    end
  end
endmodule
