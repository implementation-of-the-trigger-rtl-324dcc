// ttcl_frame_decoder: decodes aligned five-word TTCL frames.
//
// Takes the aligned word stream from ttcl_frame_aligner, collects words 0..3
// of each frame and, when word 4 arrives, acts on the frame type:
//   FT_IMP_SYNC    -> imp_sync pulse (clear all timestamp counters)
//   FT_TRIG_ACCEPT -> accept_valid pulse with the 48-bit accept_ts
//   FT_TIMESTAMP   -> sys_ts updated with the distributed system time
//   FT_COMMAND     -> cmd_valid pulse with cmd_addr/cmd_data (synchronous
//                     register write, applied at the same time in every unit)
// Idle, frame-sync and unknown frames produce nothing. The recognised frame
// kinds follow the link's description; the word layout is this design's
// choice (see ttcl_pkg). All outputs are registered; a pulse appears in the
// cycle after word 4 of its frame is presented. A frame interrupted by a
// cycle without word_valid is discarded.
module ttcl_frame_decoder
  import ttcl_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [WORD_W-1:0] word,
  input  logic [POS_W-1:0]  pos,
  input  logic              word_valid,
  output logic              imp_sync,
  output logic              accept_valid,
  output logic [TS_W-1:0]   accept_ts,
  output logic [TS_W-1:0]   sys_ts,
  output logic              cmd_valid,
  output logic [ADDR_W-1:0] cmd_addr,
  output logic [WORD_W-1:0] cmd_data,
  output logic              frame_valid,
  output frame_t            frame
);

  logic [WORD_W-1:0] w0, w1, w2, w3;
  logic [POS_W-1:0]  expect_pos;   // next position of an unbroken frame
  logic              intact;       // words 0..pos arrived without a gap
  frame_t            cur;

  always_comb begin
    cur.ftype = frame_type_e'(w0[7:0]);
    cur.w1    = w1;
    cur.w2    = w2;
    cur.w3    = w3;
    cur.w4    = word;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      w0 <= '0; w1 <= '0; w2 <= '0; w3 <= '0;
      expect_pos   <= '0;
      intact       <= 1'b0;
      imp_sync     <= 1'b0;
      accept_valid <= 1'b0;
      accept_ts    <= '0;
      sys_ts       <= '0;
      cmd_valid    <= 1'b0;
      cmd_addr     <= '0;
      cmd_data     <= '0;
      frame_valid  <= 1'b0;
      frame        <= '0;
    end else begin
      imp_sync     <= 1'b0;
      accept_valid <= 1'b0;
      cmd_valid    <= 1'b0;
      frame_valid  <= 1'b0;
      if (word_valid) begin
        expect_pos <= (pos == POS_W'(FRAME_WORDS - 1)) ? '0 : pos + 1'b1;
        intact     <= (pos == '0) || (intact && expect_pos == pos);
        unique case (pos)
          3'd0:    w0 <= word;
          3'd1:    w1 <= word;
          3'd2:    w2 <= word;
          3'd3:    w3 <= word;
          default: ;
        endcase
        if (pos == POS_W'(FRAME_WORDS - 1) && intact && expect_pos == pos &&
            w0[WORD_W-1:8] == FRAME_MARK) begin
          frame_valid <= 1'b1;
          frame       <= cur;
          case (cur.ftype)
            FT_IMP_SYNC:    imp_sync <= 1'b1;
            FT_TRIG_ACCEPT: begin
              accept_valid <= 1'b1;
              accept_ts    <= {w1, w2, w3};
            end
            FT_TIMESTAMP:   sys_ts <= {w1, w2, w3};
            FT_COMMAND: begin
              cmd_valid <= 1'b1;
              cmd_addr  <= w1[ADDR_W-1:0];
              cmd_data  <= w2;
            end
            default: ;
          endcase
        end
      end else begin
        intact <= 1'b0;
      end
    end
  end

endmodule
