// spi_master: Kintex-side SPI master for the interface FPGA's registers.
//
// One request (start with rw/addr/wdata) performs one 24-bit SPI mode-0
// transaction {rw, addr[6:0], data[15:0]}, MSB first; for a read the last 16
// bits sampled from MISO are returned in rdata. SCLK runs at
// clk / (2*HALF_DIV). Sequence: CS_N falls, MOSI is set while SCLK is low,
// SCLK rises half a period later (MISO sampled), falls after another half
// period; after 24 bits CS_N rises and stays high for three half periods before
// done pulses and busy falls. start is ignored while busy. The SPI link
// follows the design description; format and rate are this design's choice.
module spi_master
  import ttcl_pkg::*;
#(
  parameter int HALF_DIV = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              rw,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WORD_W-1:0] wdata,
  output logic              busy,
  output logic              done,
  output logic [WORD_W-1:0] rdata,
  output logic              sclk,
  output logic              cs_n,
  output logic              mosi,
  input  logic              miso
);

  localparam int NBITS = 1 + ADDR_W + WORD_W;

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_HIGH, S_LOW, S_GAP} state_e;

  state_e                      state;
  logic [$clog2(HALF_DIV)-1:0] tick;
  logic [NBITS-1:0]            tx_sr;
  logic [WORD_W-1:0]           rx_sr;
  logic [$clog2(NBITS+1)-1:0]  nbit;
  logic [1:0]                  gap_cnt;
  logic                        half_done;

  assign half_done = (tick == ($clog2(HALF_DIV))'(HALF_DIV - 1));
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      tick    <= '0;
      tx_sr   <= '0;
      rx_sr   <= '0;
      nbit    <= '0;
      gap_cnt <= '0;
      sclk    <= 1'b0;
      cs_n    <= 1'b1;
      mosi    <= 1'b0;
      done    <= 1'b0;
      rdata   <= '0;
    end else begin
      done <= 1'b0;
      tick <= half_done ? '0 : tick + 1'b1;
      unique case (state)
        S_IDLE: begin
          tick <= '0;
          if (start) begin
            tx_sr <= {rw, addr, wdata};
            cs_n  <= 1'b0;
            mosi  <= rw;
            nbit  <= '0;
            state <= S_SETUP;
          end
        end
        S_SETUP, S_LOW: if (half_done) begin
          sclk  <= 1'b1;
          rx_sr <= {rx_sr[WORD_W-2:0], miso};
          nbit  <= nbit + 1'b1;
          state <= S_HIGH;
        end
        S_HIGH: if (half_done) begin
          sclk <= 1'b0;
          if (nbit == ($clog2(NBITS+1))'(NBITS)) begin
            cs_n    <= 1'b1;
            mosi    <= 1'b0;
            gap_cnt <= '0;
            rdata   <= rx_sr;
            state   <= S_GAP;
          end else begin
            tx_sr <= {tx_sr[NBITS-2:0], 1'b0};
            mosi  <= tx_sr[NBITS-2];
            state <= S_LOW;
          end
        end
        S_GAP: if (half_done) begin
          gap_cnt <= gap_cnt + 1'b1;
          if (gap_cnt == 2'd2) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
