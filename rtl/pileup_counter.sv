// Pileup detection.
// STARTPileup is every LED trigger, STARTEvent the trigger of the event
// actually taken. PILEUP_EVENT is re-evaluated at each STARTEvent: it is
// set if an earlier LED trigger came less than PileupWait cycles before
// (pre-pileup), and it is set afterwards if another LED trigger comes less
// than PileupWait cycles after the STARTEvent (post-pileup). Two triggers
// that pile up outside both windows do not set it. An LED trigger in the
// same cycle as STARTEvent is the event's own trigger. The three cases are
// the document's; measuring the windows in clock cycles with counters is
// this design's choice. Reset value of the window: 0x400.
module pileup_counter (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_pileup_wait,
  input  logic [10:0] pileup_wait,
  input  logic        start_pileup,
  input  logic        start_event,
  output logic        pileup_event
);
  logic [10:0] win, since, post;
  logic        seen;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      win <= 11'h400; since <= '0; seen <= 1'b0; post <= '0; pileup_event <= 1'b0;
    end else begin
      if (load_pileup_wait) win <= pileup_wait;
      // time since the last LED trigger
      if (start_pileup) begin
        since <= '0; seen <= 1'b1;
      end else if (since != 11'h7FF) since <= since + 1'b1;
      // event window
      if (start_event) begin
        pileup_event <= seen && (since < win);
        post <= win;
      end else begin
        if (post != '0) post <= post - 1'b1;
        if (start_pileup && post != '0) pileup_event <= 1'b1;
      end
    end
  end
endmodule
