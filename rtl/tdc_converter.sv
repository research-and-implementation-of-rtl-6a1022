// tdc_converter: time-to-digital-code converter (digital loop filter).
//
// Measures how long EVENT stays high, in half clock periods, and presents the
// result as the control word N for the DDS. Two counters do the counting:
// one samples EVENT on the rising clock edge, the other on the falling edge
// (the inverted clock). While EVENT is high each counter counts its samples;
// their sum is the number of half-periods EVENT was seen high, which doubles
// the resolution of a single counter. The clock must be much faster than
// EVENT pulses arrive.
//
// Timing: on the first rising edge at which EVENT is low after having been
// seen high (by either counter), N = count_rise + count_fall is written to
// n_word (saturating at 2^K-1) and n_valid is high for that one cycle. The
// rising-edge counter is cleared on the same edge, the falling-edge counter
// on the next falling edge, ready for the next EVENT. Pulses or gaps shorter
// than half a clock may be missed. EVENT is sampled directly, without a
// synchronizer. Asynchronous active-low reset clears counters and n_word.
//
// The two counters (one on an inverted clock) and the adder follow the
// converter's structure; the start/stop and clear sequencing, saturation
// and the n_valid strobe are this implementation's choices.
module tdc_converter #(
  parameter int unsigned K = dds_pkg::ACC_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         event_i,
  output logic [K-1:0] n_word,
  output logic         n_valid
);
  localparam logic [K-1:0] CMAX = '1;

  logic [K-1:0] cnt_rise, cnt_fall;
  logic         ev_rise, ev_fall;   // last sample of EVENT in each edge domain
  logic         clr_fall;           // request to clear the falling-edge counter
  logic         done;
  logic [K:0]   total;

  assign done  = (ev_rise | ev_fall) & ~event_i;
  assign total = {1'b0, cnt_rise} + {1'b0, cnt_fall};

  // counter on the rising clock edge, result register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_rise <= '0;
      ev_rise  <= 1'b0;
      clr_fall <= 1'b0;
      n_word   <= '0;
      n_valid  <= 1'b0;
    end else begin
      ev_rise  <= event_i;
      clr_fall <= done;
      n_valid  <= done;
      if (done) begin
        n_word   <= total[K] ? CMAX : total[K-1:0];
        cnt_rise <= '0;
      end else if (event_i && cnt_rise != CMAX) begin
        cnt_rise <= cnt_rise + 1'b1;
      end
    end
  end

  // counter on the falling clock edge (inverted clock)
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_fall <= '0;
      ev_fall  <= 1'b0;
    end else begin
      ev_fall <= event_i;
      if (clr_fall)
        cnt_fall <= {{(K-1){1'b0}}, event_i};
      else if (event_i && cnt_fall != CMAX)
        cnt_fall <= cnt_fall + 1'b1;
    end
  end
endmodule
