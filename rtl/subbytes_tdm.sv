// subbytes_tdm: SubBytes of one 32-bit word with a single dual-port S-box RAM,
// time-multiplexed over two clock slots.
//
// A one-bit slot counter drives two address multiplexers. In slot 0 port A
// looks up In1 and port B looks up In3; in slot 1 port A looks up In2 and
// port B looks up In4. Each RAM port then feeds a time-division
// demultiplexer: the slot-0 result is kept in a holding register (q0), the
// slot-1 result is taken straight from the RAM's output register (q1).
// The RAM write ports are tied to zero. The slot assignment and the
// multiplexer/demultiplexer structure follow the original design; the
// counter being restarted by 'start' (instead of free-running) is this
// design's choice, so the slots line up with the round pipeline.
//
// Interface and timing: 'start' is a one-cycle pulse in the first cycle a new
// din is present; din must stay stable for that cycle and the next. dout is
// valid, with dout_valid high, in the second cycle after start (cycle c2),
// and stays valid until the next start + 1.
module subbytes_tdm
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t din,        // In1 = din[31:24] ... In4 = din[7:0]
  output word_t dout,
  output logic  dout_valid
);

  logic  slot;             // counter: 0 in the start cycle, 1 in the next
  logic  slot_d;           // slot delayed: RAM output holds the slot-1 results
  byte_t addra, addrb, ra, rb, q0a, q0b;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot   <= 1'b0;
      slot_d <= 1'b0;
    end else begin
      slot   <= start;
      slot_d <= slot;
    end
  end

  // Address multiplexers (Mux: In1/In2 to port A, Mux1: In3/In4 to port B)
  assign addra = slot ? din[23:16] : din[31:24];
  assign addrb = slot ? din[7:0]   : din[15:8];

  sbox_dpram u_ram (
    .clk   (clk),
    .addra (addra), .dina (8'h00), .wea (1'b0), .a (ra),
    .addrb (addrb), .dinb (8'h00), .web (1'b0), .b (rb)
  );

  // Time-division demultiplexers: slot-0 results are held in q0
  always_ff @(posedge clk)
    if (slot) begin
      q0a <= ra;
      q0b <= rb;
    end

  assign dout       = {q0a, ra, q0b, rb};
  assign dout_valid = slot_d;

endmodule
