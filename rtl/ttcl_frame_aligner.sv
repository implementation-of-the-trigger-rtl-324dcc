// ttcl_frame_aligner: finds the frame boundary in the TTCL word stream.
//
// The TTCL master sends a continuous stream of 16-bit words grouped into
// five-word frames and, among its frame types, sends frames that let a
// receiver find the frame order. This block does that job.
// While hunting it waits for a frame-sync header word ({FRAME_MARK,
// FT_FRAME_SYNC}); the word that follows is position 1 and the aligner then
// counts positions 0..4 freely. At every position 0 it checks that the word
// carries FRAME_MARK in its upper byte; MISS_LIMIT such misses in a row drop
// alignment and the aligner hunts again. The hunting and loss rules are this
// design's choice.
//
// Interface: rx_word/rx_valid from the deserializer. word/pos/word_valid are
// registered (one cycle latency); word_valid is high only while aligned.
// A word with rx_valid low does not advance the position.
module ttcl_frame_aligner
  import ttcl_pkg::*;
#(
  parameter int MISS_LIMIT = 3
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [WORD_W-1:0] rx_word,
  input  logic              rx_valid,
  output logic [WORD_W-1:0] word,
  output logic [POS_W-1:0]  pos,
  output logic              word_valid,
  output logic              aligned
);

  logic [POS_W-1:0] next_pos;
  localparam int MW = $clog2(MISS_LIMIT + 1);
  logic [MW-1:0]    miss_cnt;
  logic             sync_hdr;
  logic             hdr_ok;

  assign next_pos = (pos == POS_W'(FRAME_WORDS - 1)) ? '0 : pos + 1'b1;
  assign sync_hdr = (rx_word == header(FT_FRAME_SYNC));
  assign hdr_ok   = (rx_word[WORD_W-1:8] == FRAME_MARK);

  always_ff @(posedge clk) begin
    if (rst) begin
      aligned    <= 1'b0;
      pos        <= '0;
      word       <= '0;
      word_valid <= 1'b0;
      miss_cnt   <= '0;
    end else begin
      word_valid <= 1'b0;
      if (rx_valid) begin
        word <= rx_word;
        if (!aligned) begin
          if (sync_hdr) begin
            aligned    <= 1'b1;
            pos        <= '0;
            word_valid <= 1'b1;
            miss_cnt   <= '0;
          end
        end else begin
          // Position this word occupies.
          pos        <= next_pos;
          word_valid <= 1'b1;
          if (next_pos == '0) begin
            if (hdr_ok) begin
              miss_cnt <= '0;
            end else if (miss_cnt == MW'(MISS_LIMIT - 1)) begin
              aligned    <= 1'b0;
              word_valid <= 1'b0;
              miss_cnt   <= '0;
            end else begin
              miss_cnt <= miss_cnt + 1'b1;
            end
          end
        end
      end
    end
  end

endmodule
