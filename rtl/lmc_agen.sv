// Local memory controller (LMC) address generator.
// A weakly programmable macro: the central controller writes its registers
// over the slow control bus, after which a local sequencer produces one
// address per clock on its own:
//   addr = base + x * stride_x + y * stride_y,  x = 0..count_x-1 (inner),
//                                               y = 0..count_y-1 (outer)
// Strides are signed, so row-major, column-major (transposed), reversed and
// diagonal walks are all the same hardware. Register map (cb_addr[7:0]) in
// page BASE (cb_addr[15:8]): 0 base, 1 stride_x, 2 stride_y, 3 count_x,
// 4 count_y, 5 start (any write). addr_valid is high while a sequence runs;
// the address advances in each clock with 'run' high (consumer ready). 'done'
// pulses for one clock after the last address. Register-programmed local
// sequencing follows the source; the register set is this design's.
module lmc_agen
  import flexfilm_pkg::*;
#(
  parameter int unsigned AW   = 16,
  parameter logic [7:0]  BASE = 8'h01
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cb_we,
  input  logic [CB_AW-1:0] cb_addr,
  input  logic [CB_DW-1:0] cb_wdata,
  input  logic             run,
  output logic             addr_valid,
  output logic [AW-1:0]    addr,
  output logic             done
);
  logic [AW-1:0] base_q, sx_q, sy_q, row_q;
  logic [AW-1:0] cx_q, cy_q, x_q, y_q;
  logic          busy_q;
  logic          sel;

  assign sel        = cb_we && (cb_addr[15:8] == BASE);
  assign addr_valid = busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_q <= '0; sx_q <= '0; sy_q <= '0; cx_q <= '0; cy_q <= '0;
      row_q <= '0; addr <= '0; x_q <= '0; y_q <= '0; busy_q <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (sel) begin
        case (cb_addr[7:0])
          8'd0: base_q <= AW'(cb_wdata);
          8'd1: sx_q   <= AW'(cb_wdata);
          8'd2: sy_q   <= AW'(cb_wdata);
          8'd3: cx_q   <= AW'(cb_wdata);
          8'd4: cy_q   <= AW'(cb_wdata);
          8'd5: begin
            busy_q <= (cx_q != '0) && (cy_q != '0);
            addr   <= base_q;
            row_q  <= base_q;
            x_q    <= '0;
            y_q    <= '0;
          end
          default: ;
        endcase
      end else if (busy_q && run) begin
        if (x_q == cx_q - 1'b1) begin
          x_q   <= '0;
          y_q   <= y_q + 1'b1;
          row_q <= row_q + sy_q;
          addr  <= row_q + sy_q;
          if (y_q == cy_q - 1'b1) begin
            busy_q <= 1'b0;
            done   <= 1'b1;
          end
        end else begin
          x_q  <= x_q + 1'b1;
          addr <= addr + sx_q;
        end
      end
    end
  end
endmodule
