// Dynamic refreshing-interval controller.
//
// Dropping is switched off for one "key frame" every INTERVAL frames so that
// the visibility of every primitive is measured afresh. The interval starts
// at MIN_INTERVAL (2: a key frame every other frame). At every key frame the
// controller checks whether any new command entered the Command Buffer since
// the previous key frame: if none did, the interval grows by one up to
// MAX_INTERVAL (5), otherwise it falls back to MIN_INTERVAL. These rules and
// values follow the technique's description; making the first frame after
// reset a key frame is this design's choice.
//
// Interface: frame_start is a one-cycle pulse at the start of each frame;
// key_frame is registered on it and holds for the whole frame. new_cmd
// pulses once per command inserted into the Command Buffer. interval is the
// spacing used to schedule the next key frame.
module refresh_ctrl #(
  parameter int unsigned MIN_INTERVAL = 2,
  parameter int unsigned MAX_INTERVAL = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       frame_start,
  input  logic       new_cmd,
  output logic       key_frame,
  output logic [3:0] interval
);

  logic [3:0] since_key;   // frames started since the last key frame
  logic       first;
  logic       new_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_frame <= 1'b0;
      interval  <= 4'(MIN_INTERVAL);
      since_key <= '0;
      first     <= 1'b1;
      new_seen  <= 1'b0;
    end else begin
      if (new_cmd) new_seen <= 1'b1;
      if (frame_start) begin
        first <= 1'b0;
        if (first) begin
          key_frame <= 1'b1;
          since_key <= '0;
          new_seen  <= new_cmd;
        end else if (since_key + 1'b1 >= interval) begin
          key_frame <= 1'b1;
          since_key <= '0;
          new_seen  <= new_cmd;
          if (new_seen)
            interval <= 4'(MIN_INTERVAL);
          else if (interval < 4'(MAX_INTERVAL))
            interval <= interval + 1'b1;
        end else begin
          key_frame <= 1'b0;
          since_key <= since_key + 1'b1;
        end
      end
    end
  end

endmodule
