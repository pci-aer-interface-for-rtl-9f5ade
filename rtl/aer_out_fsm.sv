// OUT-AER state machine: turns the 32-bit words of the OFIFO into timed AER
// events on the output bus.
//
// Each word holds a time difference (bits 31:16, in ticks) and an address
// (bits 15:0). While enabled the machine pops a word, waits until the time
// difference has elapsed since the previous event was issued, puts the
// address on aer_addr and runs a four-phase handshake: raise aer_req, wait
// for aer_ack high, drop aer_req, wait for aer_ack low. A tick is one clock
// cycle, or 16 cycles with presc set. The wait-only word (all ones) makes the
// machine wait the longest 16-bit time and fetch the next word without
// sending anything.
//
// Delay recovery: a signed time credit receives each word's time difference
// and loses one per tick during the wait, the handshake and the fetch alike.
// An event is issued once the credit is no longer positive. A slow
// acknowledge therefore shortens the next wait; when the credit is still
// negative after the next word's time difference has been added, that event
// leaves without waiting and the remaining debt carries into the following
// one. Event times thus follow the absolute schedule written by the host
// rather than drifting with every late ACK. In steady state an event leaves
// exactly its time difference after the previous one, provided the
// handshake and fetch (about six cycles with a prompt ACK) fit into it.
//
// Follows the document: the word format, the 16x tick scaling, the wait-only
// word, the discounting of late acknowledges and the carrying of a negative
// result. This design's own choices: the wait-word encoding, active-high
// handshake lines, two-flop synchronisation of aer_ack, the timer being
// frozen while the OFIFO is empty, the credit cleared while disabled, and
// saturation of the credit at its most negative value.
module aer_out_fsm
  import pci_aer_pkg::*;
#(
  parameter int unsigned CW = 24  // credit width, signed
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  input  logic            presc,
  // OFIFO read side
  input  logic [EVW-1:0]  fifo_rdata,
  input  logic            fifo_empty,
  output logic            fifo_pop,
  // AER output bus
  output logic [ADRW-1:0] aer_addr,
  output logic            aer_req,
  input  logic            aer_ack,
  // status
  output logic            busy,       // a word is being processed
  output logic            sent,       // one-cycle pulse: event issued
  output logic            late,       // one-cycle pulse: event issued behind its schedule
  output logic            wait_done   // one-cycle pulse: wait-only word consumed
);
  typedef enum logic [1:0] {S_FETCH, S_WAIT, S_REQ, S_REL} state_t;

  state_t           state;
  aer_word_t        word;
  logic signed [CW-1:0] credit;
  logic [3:0]       pcnt;
  logic             tick, ack_s, running, fire, starved;
  logic signed [CW:0]   credit_sum;

  aer_sync u_ack_sync (.clk, .rst_n, .d(aer_ack), .q(ack_s));

  assign tick     = !presc || (pcnt == 4'(PRESCALE - 1));
  assign fifo_pop = (state == S_FETCH) && enable && !fifo_empty;
  // The timer stands still while the machine waits for a word, including the
  // cycle that ends such a wait; in a continuous stream every cycle counts.
  assign running  = (state != S_FETCH) || (fifo_pop && !starved);
  assign fire     = (state == S_WAIT) && (credit <= 0);
  assign busy     = (state != S_FETCH);

  // credit + new time difference - elapsed tick, one bit wider to catch underflow
  always_comb begin
    credit_sum = (CW+1)'(credit);
    if (fifo_pop) credit_sum = credit_sum + (CW+1)'({1'b0, fifo_rdata[EVW-1:ADRW]});
    if (running && tick) credit_sum = credit_sum - 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcnt <= '0;
    end else begin
      pcnt <= pcnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_FETCH;
      starved   <= 1'b1;
      word      <= '0;
      credit    <= '0;
      aer_addr  <= '0;
      aer_req   <= 1'b0;
      sent      <= 1'b0;
      late      <= 1'b0;
      wait_done <= 1'b0;
    end else begin
      sent      <= 1'b0;
      late      <= 1'b0;
      wait_done <= 1'b0;

      if (state == S_FETCH && !enable) credit <= '0;
      else if (credit_sum < -(CW+1)'(2**(CW-1))) credit <= {1'b1, {(CW-1){1'b0}}};
      else credit <= CW'(credit_sum);

      unique case (state)
        S_FETCH: if (fifo_pop) begin
          word    <= aer_word_t'(fifo_rdata);
          starved <= 1'b0;
          state   <= S_WAIT;
        end else begin
          starved <= 1'b1;
        end
        S_WAIT: if (fire) begin
          if (word == aer_word_t'(WAIT_WORD)) begin
            wait_done <= 1'b1;
            state     <= S_FETCH;
          end else begin
            aer_addr <= word.addr;
            aer_req  <= 1'b1;
            sent     <= 1'b1;
            late     <= (credit < 0);
            state    <= S_REQ;
          end
        end
        S_REQ: if (ack_s) begin
          aer_req <= 1'b0;
          state   <= S_REL;
        end
        S_REL: if (!ack_s) state <= S_FETCH;
        default: state <= S_FETCH;
      endcase
    end
  end

  // Four-phase rule: the address does not change while REQ is high.
  a_addr_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  aer_req && $past(aer_req) |-> $stable(aer_addr));
endmodule
