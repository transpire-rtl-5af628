// pe_is: Instruction Synchronizer of a processing element.
//
// Counts the cycles of the operation in flight. The current instruction's
// latency (1, 2 or 5 cycles, the values the architecture supports) arrives
// on `lat`; `first` is high in the issue cycle, and `fetch_en` goes high in
// the last cycle, telling the controller to retire the instruction and fetch
// the next one. The counter moves only while `adv` is high (PE running and
// the array not stalled); `clear` restarts it when a kernel starts.
module pe_is (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       adv,
  input  logic [2:0] lat,
  output logic       first,
  output logic       fetch_en
);
  logic [2:0] cnt;
  logic       last;

  assign first    = (cnt == 3'd0);
  assign last     = (lat <= 3'd1) || (cnt == lat - 3'd1);
  assign fetch_en = adv && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cnt <= '0;
    else if (clear)    cnt <= '0;
    else if (adv)      cnt <= last ? 3'd0 : cnt + 3'd1;
  end
endmodule
