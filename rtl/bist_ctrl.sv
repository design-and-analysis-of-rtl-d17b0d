// BIST controller unit: runs one self-test session of the UART.
//
// In normal operation (state IDLE) the UART is driven from its pins. A rising
// request on bist_start begins a session: for one clock, restart resets the
// pattern generator, the response analyser and the UART, and from then on
// test_mode switches the UART's inputs to the test multiplexer. For each
// pattern the controller
//   SEND  waits until the generator has shifted the pattern into the
//         receiver (ser_done, remembered if it came early);
//   LOAD  then waits until the transmit buffer is empty (txrdy) and writes
//         the same pattern, in parallel, into it (wr);
//   NEXT  pulses trigger so the generator moves to the next pattern.
// The receiver only shows a byte after the following byte has filled its
// input register, so the generator sends N_PATTERNS + 1 patterns serially
// and the transmitter gets N_PATTERNS of them. Whenever the receiver buffer
// is full during the session the controller reads it (peri_rqt), so the
// receiver never overflows. DRAIN waits for the response analyser to have
// checked N_PATTERNS words from each side; then DONE raises bist_done and
// gives correct (no mismatch) or wrong. The results hold until the next
// session; bist_start must fall before a new session can start.
// The controller's role (driving the generator, the analyser and the
// multiplexer that reconfigures the circuit under test) is the document's;
// the states and handshakes are this design's.
module bist_ctrl
  import uart_bist_pkg::*;
#(
  parameter int unsigned N_PATTERNS = 255,
  parameter int unsigned AW         = 8
) (
  input  logic        clk,
  input  logic        rst,          // synchronous, active high
  input  logic        bist_start,
  // pattern generator
  input  logic        ser_done,
  output logic        trigger,
  // UART
  input  logic        txrdy,
  input  logic        rx_full,
  output logic        wr,
  output logic        peri_rqt,
  // response analyser
  input  logic [AW:0] n_tx,
  input  logic [AW:0] n_rx,
  input  logic [AW:0] n_fail,
  // session control and result
  output logic        restart,      // one-clock reset of generator, analyser, UART
  output logic        test_mode,    // UART inputs from the test multiplexer
  output bist_state_e state,
  output logic        bist_done,
  output logic        correct,
  output logic        wrong
);

  localparam int unsigned CNT_W = $clog2(N_PATTERNS + 2);

  logic [CNT_W-1:0] sent;       // patterns finished (serialised and written)
  logic             ser_seen;
  logic             start_q;
  logic             start_rise;

  assign start_rise = bist_start && !start_q;
  assign test_mode  = (state != BIST_IDLE) && (state != BIST_DONE);
  assign wr         = (state == BIST_LOAD) && !restart && txrdy && (sent < CNT_W'(N_PATTERNS));
  assign trigger    = (state == BIST_NEXT);
  assign peri_rqt   = test_mode && rx_full;
  assign bist_done  = (state == BIST_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= BIST_IDLE;
      start_q  <= 1'b0;
      restart  <= 1'b0;
      sent     <= '0;
      ser_seen <= 1'b0;
      correct  <= 1'b0;
      wrong    <= 1'b0;
    end else begin
      start_q <= bist_start;
      restart <= 1'b0;
      if (ser_done) ser_seen <= 1'b1;
      unique case (state)
        BIST_IDLE, BIST_DONE: begin
          if (start_rise) begin
            restart  <= 1'b1;
            sent     <= '0;
            ser_seen <= 1'b0;
            correct  <= 1'b0;
            wrong    <= 1'b0;
            state    <= BIST_SEND;
          end
        end
        BIST_SEND: begin
          if (ser_seen || ser_done) begin
            ser_seen <= 1'b0;
            state    <= BIST_LOAD;
          end
        end
        BIST_LOAD: begin
          // the last pattern only flushes the receiver and is not written
          if (wr || sent >= CNT_W'(N_PATTERNS)) begin
            sent <= sent + 1'b1;
            if (sent == CNT_W'(N_PATTERNS)) state <= BIST_DRAIN;
            else                            state <= BIST_NEXT;
          end
        end
        BIST_NEXT: state <= BIST_SEND;
        BIST_DRAIN: begin
          if (n_tx == (AW+1)'(N_PATTERNS) && n_rx == (AW+1)'(N_PATTERNS)) begin
            correct <= (n_fail == '0);
            wrong   <= (n_fail != '0);
            state   <= BIST_DONE;
          end
        end
        default: state <= BIST_IDLE;
      endcase
    end
  end

  a_wr_only_when_ready: assert property (@(posedge clk) disable iff (rst) wr |-> txrdy);

endmodule
