// Memory load generator for quality-of-service tests.
// When enabled it produces one burst request every cfg_period clocks, at
// linearly increasing burst addresses (a stream like a wavelet filter's line
// access). Due requests wait in a queue of QDEPTH entries (the buffering of a
// real-time stream); the head is presented with req_valid until the controller
// accepts it. A request that falls due while the queue is full has missed its
// deadline: it is counted in 'lost' and dropped, and the address stream
// continues without a gap. Because queued addresses are consecutive, the queue
// is just a head address and a count. Writes carry a data pattern derived from
// the address. Period, linear pattern and lost-request counting follow the
// source; the queue depth, drop rule and data pattern are this design's.
// The base address is loaded while the generator is disabled.
module load_gen
  import flexfilm_pkg::*;
#(
  parameter int unsigned AW = 22,
  parameter int unsigned DW = 128,
  parameter int unsigned BEATS = 4,
  parameter int unsigned PW = 8,
  parameter int unsigned QDEPTH = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_en,
  input  logic          cfg_we,
  input  logic [PW-1:0] cfg_period,
  input  logic [AW-1:0] cfg_base,
  output logic          req_valid,
  input  logic          req_ready,
  output logic          req_we,
  output logic [AW-1:0] req_addr,
  output logic [DW-1:0] req_wdata [BEATS],
  output logic [31:0]   lost,
  output logic [31:0]   issued
);
  logic [PW-1:0] tick_q;
  logic [$clog2(QDEPTH+1)-1:0] cnt_q;
  logic          due, pop;

  assign due    = cfg_en && (tick_q == '0);
  assign req_we = cfg_we;
  assign req_valid = (cnt_q != '0);
  assign pop = req_valid && req_ready;

  always_comb begin
    for (int k = 0; k < BEATS; k++)
      req_wdata[k] = {DW/32{32'(req_addr) ^ 32'(k * 32'h9E37_79B9)}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick_q   <= '0;
      cnt_q    <= '0;
      req_addr <= '0;
      lost     <= '0;
      issued   <= '0;
    end else if (!cfg_en) begin
      tick_q   <= '0;
      cnt_q    <= '0;
      req_addr <= cfg_base;
    end else begin
      tick_q <= (tick_q == cfg_period - 1'b1) ? '0 : tick_q + 1'b1;
      if (pop) begin
        req_addr <= req_addr + 1'b1;
        issued   <= issued + 1'b1;
      end
      if (due && !pop && cnt_q == ($bits(cnt_q))'(QDEPTH)) lost <= lost + 1'b1;
      if (due && !pop && cnt_q != ($bits(cnt_q))'(QDEPTH)) cnt_q <= cnt_q + 1'b1;
      if (!due && pop) cnt_q <= cnt_q - 1'b1;
    end
  end
endmodule
