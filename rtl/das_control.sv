// das_control: DAS control registers, sequencer and host handshake.
//
// Holds the three user parameters the host loads as consecutive 16-bit
// control words after a LOAD function (trigger line selection code, trigger
// word, number of DAS words to acquire) and runs the acquisition cycle:
//
//   IDLE --START--> ARMED --trigger found--> ACQ --buffer reached count-->
//   READY --READ--> DNLOAD --last word taken--> IDLE (or ARMED)
//
// READY sets csr bit 10, the ready-to-down-load flag the host polls; the flag
// stays set through the down-load and clears after the last word is taken.
// RESET returns to IDLE at once from any state without touching the control
// registers. A START that arrives while data is waiting or being down-loaded
// is remembered and re-arms the trigger as soon as the last word is taken
// (repetitive acquisition); a START while armed or acquiring restarts the
// search. A READ outside READY is ignored. Control words are accepted in any
// state. `clr` pulses for one clock whenever a new search begins or on RESET,
// restarting the buffer addresses and the trigger shift register.
//
// Host handshake (this design's own): `fn_valid` with `fn` for one clock
// requests a function; `in_valid`/`in_data` deliver control words; in DNLOAD
// `out_valid` shows a word on the buffer's read port and the host takes it
// with `out_ready`. After each word one clock passes before the next is shown
// (read-port latency). ARMED is entered one clock after START.
module das_control
  import das_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fn_valid,
  input  das_fn_e     fn,
  input  logic        in_valid,
  input  das_word_t   in_data,
  input  logic        trig_hit,
  input  logic        full,
  input  logic        rd_empty,
  input  logic        out_ready,
  output sel_code_t   sel,
  output das_word_t   trig_word,
  output logic [15:0] count,
  output logic        armed,
  output logic        acquiring,
  output logic        clr,
  output logic        rd_next,
  output logic        out_valid,
  output das_word_t   csr,
  output das_state_e  state
);
  logic       loading;
  logic [1:0] ld_idx;
  logic       pending;
  logic       rd_wait;     // read port settling after an address change

  assign armed     = (state == ST_ARMED);
  assign acquiring = (state == ST_ACQ);
  assign out_valid = (state == ST_DNLOAD) && !rd_wait && !rd_empty;
  assign rd_next   = out_valid && out_ready;

  always_comb begin
    csr              = '0;
    csr[3:0]         = sel;
    csr[CSR_ARMED]   = armed;
    csr[CSR_ACQ]     = acquiring;
    csr[CSR_READY]   = (state == ST_READY) || (state == ST_DNLOAD);
    csr[CSR_DNLOAD]  = (state == ST_DNLOAD);
    csr[CSR_PENDING] = pending;
  end

  // Control registers: survive the RESET function, cleared only at power-on.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel       <= SEL_T1;
      trig_word <= '0;
      count     <= '0;
      loading   <= 1'b0;
      ld_idx    <= '0;
    end else if (fn_valid && fn == FN_LOAD) begin
      loading <= 1'b1;
      ld_idx  <= '0;
    end else if (loading && in_valid) begin
      unique case (ld_idx)
        2'd0:    sel       <= sel_code_t'(in_data[3:0]);
        2'd1:    trig_word <= in_data;
        default: count     <= in_data;
      endcase
      ld_idx  <= ld_idx + 2'd1;
      loading <= (ld_idx != 2'd2);
    end
  end

  // Sequencer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      pending <= 1'b0;
      clr     <= 1'b1;
      rd_wait <= 1'b1;
    end else begin
      clr     <= 1'b0;
      rd_wait <= rd_next;
      if (fn_valid && fn == FN_RESET) begin
        state   <= ST_IDLE;
        pending <= 1'b0;
        clr     <= 1'b1;
      end else if (fn_valid && fn == FN_START &&
                   (state == ST_READY || state == ST_DNLOAD)) begin
        pending <= 1'b1;
      end else if (fn_valid && fn == FN_START) begin
        state <= ST_ARMED;
        clr   <= 1'b1;
      end else begin
        unique case (state)
          ST_IDLE:  ;
          ST_ARMED: if (trig_hit) state <= ST_ACQ;
          ST_ACQ:   if (full) state <= ST_READY;
          ST_READY: if (fn_valid && fn == FN_READ) begin
                      state   <= ST_DNLOAD;
                      rd_wait <= 1'b1;
                    end
          ST_DNLOAD: if (!rd_wait && rd_empty) begin
                      if (pending) begin
                        state   <= ST_ARMED;
                        pending <= 1'b0;
                        clr     <= 1'b1;
                      end else begin
                        state <= ST_IDLE;
                      end
                    end
          default:  state <= ST_IDLE;
        endcase
      end
    end
  end

// An offered word stays offered until the host takes it (or RESET).
  a_hold_offer: assert property (@(posedge clk) disable iff (!rst_n)
                                 out_valid && !out_ready && !(fn_valid && fn == FN_RESET) |=> out_valid)
    else $error("das_control: offered word withdrawn");
  // The ready flag is never set while the trigger is searched or data stored.
  a_ready_excl: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(csr[CSR_READY] && (armed || acquiring)))
    else $error("das_control: ready flag during acquisition");
endmodule
