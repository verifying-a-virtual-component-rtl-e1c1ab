// pci_target_model: behavioural PCI arbiter and memory target, for
// simulation only (not synthesizable).
//
// Arbiter: while REQ# is asserted it asserts GNT# after 1 to 4 clocks and
// holds it until REQ# is released. Target: it decodes every address phase
// (FRAME# asserted) and answers the single data phase after 0 to 3 wait
// states with one of
//   - target abort (STOP# with DEVSEL# deasserted) for addresses whose top
//     nibble is ABORT_NIBBLE;
//   - retry (STOP# and DEVSEL#) with probability RETRY_PCT percent, never
//     more than MAX_RETRIES times in a row;
//   - otherwise a normal transfer (TRDY# and DEVSEL#): a memory read
//     returns the stored word on AD, a memory write stores the AD bytes
//     selected by the active-low byte enables.
// Unwritten words read as mem_default(word address). The response is held
// until the initiator has sampled it with IRDY# asserted.
//
// It also checks the initiator: PAR in the clock after an address phase or
// a write data transfer must give even parity over the AD and C/BE# of that
// clock, the command must be memory read or memory write, and the
// initiator must drive AD in the address phase. Every attempt is appended
// to `log` for the testbench to compare with the requests it issued.
// The model acts on the falling clock edge, so the wrapper, which acts on
// the rising edge, always sees stable inputs.
module pci_target_model #(
  parameter int DATA_W       = 32,
  parameter int RETRY_PCT    = 15,
  parameter int MAX_RETRIES  = 3,
  parameter logic [3:0] ABORT_NIBBLE = 4'hE
) (
  input  logic              clk,
  input  logic              reset_l,
  input  logic              req_l,
  output logic              gnt_l,
  input  logic              frame_l,
  input  logic              irdy_l,
  input  logic [3:0]        cbe_l,
  input  logic              cbe_oe,
  input  logic [DATA_W-1:0] ad_o,
  input  logic              ad_oe,
  input  logic              par,
  input  logic              par_oe,
  output logic [DATA_W-1:0] ad_i,
  output logic              trdy_l,
  output logic              stop_l,
  output logic              devsel_l
);

  typedef struct {
    logic [DATA_W-1:0] addr;
    logic [3:0]        cmd;
    logic [3:0]        be;      // active high
    logic [DATA_W-1:0] wdata;
    int                outcome; // 0 transfer, 1 retry, 2 target abort
  } attempt_t;

  attempt_t log[$];
  logic [DATA_W-1:0] mem [logic [DATA_W-1:0]];

  int errors = 0;
  int n_retry = 0, n_abort = 0, n_read = 0, n_write = 0, n_wait = 0, n_gnt_wait = 0;
  int n_frames = 0, n_parity_checked = 0;

  function automatic logic [DATA_W-1:0] mem_default(input logic [DATA_W-1:0] word);
    return DATA_W'(word * 32'h9E37_79B9) ^ DATA_W'(32'h5A5A_0F0F);
  endfunction

  function automatic logic [DATA_W-1:0] be_mask(input logic [3:0] be);
    logic [DATA_W-1:0] m = '0;
    for (int i = 0; i < DATA_W / 8 && i < 4; i++) if (be[i]) m[i*8 +: 8] = 8'hFF;
    return m;
  endfunction

  task automatic error(input string what);
    errors++;
    if (errors < 10) $display("PCI target: %s at %0t", what, $time);
  endtask

  initial begin
    typedef enum {T_IDLE, T_WAIT, T_RESP} tstate_e;
    tstate_e ts = T_IDLE;
    attempt_t cur;
    int wait_n = 0, gnt_delay = 0, retries_in_row = 0;
    bit par_due = 1'b0;
    logic par_expect = 1'b0;
    logic [DATA_W-1:0] word, old;

    gnt_l = 1'b1; trdy_l = 1'b1; stop_l = 1'b1; devsel_l = 1'b1; ad_i = '0;
    forever begin
      @(negedge clk);
      if (!reset_l) begin
        gnt_l = 1'b1; trdy_l = 1'b1; stop_l = 1'b1; devsel_l = 1'b1;
        ts = T_IDLE;
        par_due = 1'b0;
        continue;
      end

      // parity of the previous clock's AD and C/BE#
      if (par_due) begin
        n_parity_checked++;
        if (!par_oe) error("PAR not driven");
        else if (par !== par_expect) error("wrong PAR");
      end
      par_due = 1'b0;

      // arbiter
      if (!req_l) begin
        if (gnt_l) begin
          if (gnt_delay == 0) gnt_delay = 1 + $urandom % 4;
          gnt_delay--;
          if (gnt_delay == 0) gnt_l = 1'b0; else n_gnt_wait++;
        end
      end else begin
        gnt_l = 1'b1;
        gnt_delay = 0;
      end

      unique case (ts)
        T_IDLE: if (!frame_l) begin
          n_frames++;
          if (!ad_oe || !cbe_oe) error("address phase not driven");
          cur.addr = ad_o;
          cur.cmd  = cbe_l;
          if (cbe_l != 4'b0110 && cbe_l != 4'b0111) error("unexpected PCI command");
          par_due = 1'b1;
          par_expect = ^{ad_o, cbe_l};
          wait_n = $urandom % 4;
          if (cur.addr[DATA_W-1 -: 4] == ABORT_NIBBLE) cur.outcome = 2;
          else if (retries_in_row < MAX_RETRIES && ($urandom % 100) < RETRY_PCT) cur.outcome = 1;
          else cur.outcome = 0;
          ts = T_WAIT;
        end
        T_WAIT: begin
          if (irdy_l) error("IRDY# not asserted in the data phase");
          if (wait_n != 0) begin
            wait_n--;
            n_wait++;
          end else begin
            word = cur.addr >> 2;
            unique case (cur.outcome)
              0: begin
                trdy_l = 1'b0; stop_l = 1'b1; devsel_l = 1'b0;
                ad_i = (cur.cmd == 4'b0110) ? (mem.exists(word) ? mem[word] : mem_default(word)) : '0;
              end
              1: begin trdy_l = 1'b1; stop_l = 1'b0; devsel_l = 1'b0; end
              default: begin trdy_l = 1'b1; stop_l = 1'b0; devsel_l = 1'b1; end
            endcase
            // byte enables and write data of the transfer clock; PAR for
            // this data clock is due in the next one
            cur.be     = ~cbe_l;
            cur.wdata  = (cur.cmd == 4'b0111) ? ad_o : '0;
            if (cur.cmd == 4'b0111 && !ad_oe) error("write data not driven");
            par_expect = ^{ad_o, cbe_l};
            ts = T_RESP;
          end
        end
        T_RESP: begin
          // the rising edge between has taken the response
          if (cur.cmd == 4'b0111) begin
            n_parity_checked++;
            if (!par_oe) error("PAR not driven after write data");
            else if (par !== par_expect) error("wrong PAR after write data");
          end
          if (cur.outcome == 0 && cur.cmd == 4'b0111) begin
            word = cur.addr >> 2;
            old  = mem.exists(word) ? mem[word] : mem_default(word);
            mem[word] = (old & ~be_mask(cur.be)) | (cur.wdata & be_mask(cur.be));
          end
          unique case (cur.outcome)
            0: begin
              if (cur.cmd == 4'b0111) n_write++; else n_read++;
              retries_in_row = 0;
            end
            1: begin n_retry++; retries_in_row++; end
            default: begin n_abort++; retries_in_row = 0; end
          endcase
          log.push_back(cur);
          trdy_l = 1'b1; stop_l = 1'b1; devsel_l = 1'b1; ad_i = '0;
          ts = T_IDLE;
        end
        default: ts = T_IDLE;
      endcase
    end
  end

endmodule
