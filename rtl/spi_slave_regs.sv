// spi_slave_regs: SPI slave and register file of the TTCL interface FPGA.
//
// The Kintex programs the control registers that steer TTCL decoding and
// triggering over SPI, and reads back status. The transaction format is this
// design's choice: SPI mode 0 (SCLK idles low, both sides sample on the
// rising edge and change on the falling edge), chip select low for 24 bits,
// MSB first:
//   bit 23 = 1 for read, 0 for write; bits 22:16 = address; bits 15:0 = data.
// For a read the slave returns the addressed register in the last 16 bits.
// SCLK, CS_N and MOSI are synchronised into clk with two flip-flops and the
// edges are detected there, so SCLK must stay below about clk/8.
//
// Registers (addresses in ttcl_pkg): CTRL, OFFSET and TRIG_DELAY are
// writable; STATUS, counters, the last system timestamp and ID are read
// only. A TTCL command frame (cmd_valid/cmd_addr/cmd_data) writes the same
// writable registers; if both write one register in the same cycle the
// command frame wins. Writes to read-only or unknown addresses are ignored
// and unknown addresses read as zero.
module spi_slave_regs
  import ttcl_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // SPI pins
  input  logic              sclk,
  input  logic              cs_n,
  input  logic              mosi,
  output logic              miso,
  // command-frame write port
  input  logic              cmd_valid,
  input  logic [ADDR_W-1:0] cmd_addr,
  input  logic [WORD_W-1:0] cmd_data,
  // status inputs
  input  logic [WORD_W-1:0] status,
  input  logic [WORD_W-1:0] late_cnt,
  input  logic [WORD_W-1:0] trig_cnt,
  input  logic [WORD_W-1:0] acc_cnt,
  input  logic [TS_W-1:0]   sys_ts,
  // control outputs
  output logic [WORD_W-1:0] ctrl,
  output logic [WORD_W-1:0] offset,
  output logic [WORD_W-1:0] trig_delay
);

  localparam int NBITS = 1 + ADDR_W + WORD_W;   // 24

  logic [2:0] sclk_s, cs_s, mosi_s;
  logic       sclk_rise, sclk_fall, active;

  always_ff @(posedge clk) begin
    if (rst) begin
      sclk_s <= '0;
      cs_s   <= '1;
      mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[1:0], cs_n};
      mosi_s <= {mosi_s[1:0], mosi};
    end
  end

  assign active    = !cs_s[1];
  assign sclk_rise = active && sclk_s[1] && !sclk_s[2];
  assign sclk_fall = active && !sclk_s[1] && sclk_s[2];

  logic [NBITS-1:0]        rx_sr;
  logic [$clog2(NBITS):0]  bit_cnt;
  logic [WORD_W-1:0]       tx_sr;
  logic                    spi_we;
  logic [ADDR_W-1:0]       spi_addr;
  logic [WORD_W-1:0]       spi_data;
  logic [NBITS-1:0]        rx_next;

  assign rx_next = {rx_sr[NBITS-2:0], mosi_s[1]};

  function automatic logic [WORD_W-1:0] read_reg(logic [ADDR_W-1:0] a);
    case (a)
      REG_CTRL:       return ctrl;
      REG_OFFSET:     return offset;
      REG_TRIG_DELAY: return trig_delay;
      REG_STATUS:     return status;
      REG_LATE_CNT:   return late_cnt;
      REG_TRIG_CNT:   return trig_cnt;
      REG_SYS_TS0:    return sys_ts[15:0];
      REG_SYS_TS1:    return sys_ts[31:16];
      REG_SYS_TS2:    return sys_ts[47:32];
      REG_ACC_CNT:    return acc_cnt;
      REG_ID:         return ID_VALUE;
      default:        return '0;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_sr   <= '0;
      bit_cnt <= '0;
      tx_sr   <= '0;
      miso    <= 1'b0;
      spi_we  <= 1'b0;
      spi_addr <= '0;
      spi_data <= '0;
    end else begin
      spi_we <= 1'b0;
      if (!active) begin
        bit_cnt <= '0;
        miso    <= 1'b0;
      end else begin
        if (sclk_rise) begin
          rx_sr   <= rx_next;
          bit_cnt <= bit_cnt + 1'b1;
          if (bit_cnt == ($clog2(NBITS)+1)'(ADDR_W)) begin
            // rw and address complete: load read data
            tx_sr <= read_reg(rx_next[ADDR_W-1:0]);
          end
          if (bit_cnt == ($clog2(NBITS)+1)'(NBITS - 1) && !rx_next[NBITS-1]) begin
            spi_we   <= 1'b1;
            spi_addr <= rx_next[NBITS-2 -: ADDR_W];
            spi_data <= rx_next[WORD_W-1:0];
          end
        end
        if (sclk_fall && bit_cnt > ($clog2(NBITS)+1)'(ADDR_W)) begin
          miso  <= tx_sr[WORD_W-1];
          tx_sr <= {tx_sr[WORD_W-2:0], 1'b0};
        end
      end
    end
  end

  // Writable registers: SPI write first, command frame overrides.
  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl       <= CTRL_RESET;
      offset     <= '0;
      trig_delay <= '0;
    end else begin
      if (spi_we) begin
        case (spi_addr)
          REG_CTRL:       ctrl       <= spi_data;
          REG_OFFSET:     offset     <= spi_data;
          REG_TRIG_DELAY: trig_delay <= spi_data;
          default: ;
        endcase
      end
      if (cmd_valid) begin
        case (cmd_addr)
          REG_CTRL:       ctrl       <= cmd_data;
          REG_OFFSET:     offset     <= cmd_data;
          REG_TRIG_DELAY: trig_delay <= cmd_data;
          default: ;
        endcase
      end
    end
  end

endmodule
