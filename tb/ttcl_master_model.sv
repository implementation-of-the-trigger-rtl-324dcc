// ttcl_master_model: behavioural model of a TTCL master, for testbenches.
//
// Emits one 16-bit word per clock. Frames queued with the tasks below are
// sent whole and in order; when nothing is queued the model sends idle
// frames, every fourth of them a frame-sync frame. Before the first frame it
// sends 'lead' words of garbage so the receiver starts unaligned. slip()
// inserts one stray word, which shifts the frame boundary seen by receivers.
// The model keeps its own timestamp counter, cleared when an imperative sync
// frame's last word leaves it. Frame layout as in ttcl_pkg.
module ttcl_master_model
  import ttcl_pkg::*;
#(
  parameter int LEAD = 3
) (
  input  logic              clk,
  input  logic              rst,
  output logic [WORD_W-1:0] word,
  output logic              valid
);

  logic [WORD_W-1:0] q [$];
  logic              last_of_sync [$];
  int unsigned       idle_n = 0;
  int unsigned       words_sent = 0;

  task automatic push_frame(frame_type_e t, logic [WORD_W-1:0] w1, logic [WORD_W-1:0] w2,
                            logic [WORD_W-1:0] w3, logic [WORD_W-1:0] w4);
    q.push_back(header(t)); last_of_sync.push_back(1'b0);
    q.push_back(w1);        last_of_sync.push_back(1'b0);
    q.push_back(w2);        last_of_sync.push_back(1'b0);
    q.push_back(w3);        last_of_sync.push_back(1'b0);
    q.push_back(w4);        last_of_sync.push_back(t == FT_IMP_SYNC);
  endtask

  task automatic send_ts(frame_type_e t, logic [TS_W-1:0] ts);
    push_frame(t, ts[47:32], ts[31:16], ts[15:0], 16'h0000);
  endtask

  task automatic send_cmd(logic [ADDR_W-1:0] a, logic [WORD_W-1:0] d);
    push_frame(FT_COMMAND, {9'd0, a}, d, 16'h0000, 16'h0000);
  endtask

  task automatic send_frame_sync();
    push_frame(FT_FRAME_SYNC, SYNC_FILL, SYNC_FILL, SYNC_FILL, SYNC_FILL);
  endtask

  task automatic slip();
    q.push_back(16'h1234); last_of_sync.push_back(1'b0);
  endtask

  function automatic int pending();
    return q.size();
  endfunction

  initial begin
    for (int i = 0; i < LEAD; i++) begin
      q.push_back(16'h5A00 + 16'(i)); last_of_sync.push_back(1'b0);
    end
  end

  always @(posedge clk) begin
    if (rst) begin
      word  <= '0;
      valid <= 1'b0;
    end else begin
      if (q.size() == 0) begin
        if (idle_n % 4 == 0) send_frame_sync();
        else                 push_frame(FT_IDLE, 16'h0, 16'h0, 16'h0, 16'h0);
        idle_n++;
      end
      word  <= q.pop_front();
      void'(last_of_sync.pop_front());
      valid <= 1'b1;
      words_sent++;
    end
  end

endmodule
