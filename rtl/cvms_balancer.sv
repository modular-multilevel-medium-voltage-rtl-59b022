// cvms_balancer: sorting-less capacitor voltage balancing of one arm with
// the capacitor voltage mapping strategy (CVMS).
//
// Instead of sorting, every SM position is written into the FIFO of the
// voltage sub-range its capacitor voltage falls in, so the FIFO array is a
// ranked list as soon as all SMs are stored. The SMs to insert are then read
// from the lowest (arm current > 0) or highest (otherwise) sub-range on.
//
// Sequence after `start` (sampled while idle, together with vc, n_sm, n_ins
// and i_arm): one cycle to clear the array, then the SMs 0..n_sm-1 one after
// another, three cycles each (subtract, multiply, truncate-and-store), then
// the read, n_ins cycles plus one per empty sub-range passed. That follows
// the document's 3N store time and N read time. `done` pulses when the new
// gate pattern is on `gate`; it is held until the next run ends. `overflow`
// reports a sub-range FIFO that filled up (impossible with DEPTH = N).
// The reader's busy flag and selection count feed only the assertions at the
// end; lint tools that ignore assertions may list rst_n as used both
// synchronously and asynchronously for the same reason (the assertions are
// disabled during reset), which is not a circuit issue.
module cvms_balancer #(
  parameter int N      = 64,          // SMs per arm at most
  parameter int BV     = 12,          // capacitor voltage code width
  parameter int BP     = 6,           // SM position width
  parameter int LEVELS = 64,          // sub-ranges / FIFOs (M)
  parameter int DEPTH  = N,           // cells per FIFO
  parameter int IW     = 16,          // arm current width
  parameter int FRAC   = 2 * BV + 2,  // fraction bits of inv_dv
  parameter int INVW   = FRAC + $clog2(LEVELS) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [$clog2(N+1)-1:0] n_sm,
  input  logic [$clog2(N+1)-1:0] n_ins,
  input  logic signed [IW-1:0]   i_arm,
  input  logic [N-1:0][BV-1:0]   vc,
  input  logic [BV-1:0]          vc_min,
  input  logic [INVW-1:0]        inv_dv,
  output logic [N-1:0]           gate,
  output logic                   busy,
  output logic                   done,
  output logic                   overflow
);
  localparam int AW = $clog2(LEVELS);
  localparam int NW = $clog2(N + 1);

  typedef enum logic [2:0] {B_IDLE, B_CLEAR, B_STORE, B_READ_GO, B_READ} bstate_t;

  bstate_t                 state;
  logic [N-1:0][BV-1:0]    vc_q;
  logic [NW-1:0]           n_sm_q, n_ins_q, idx;
  logic signed [IW-1:0]    i_q;
  logic [1:0]              phase;     // position within the 3-cycle store slot

  logic                    sc_in_valid, sc_out_valid;
  logic [AW-1:0]           sc_addr;
  logic [BP-1:0]           sc_pos;
  logic [BP-1:0]           head_data;
  logic [LEVELS-1:0]       empty;
  logic                    rd_pop, rd_busy, rd_done;
  logic [AW-1:0]           rd_addr;
  logic [N-1:0]            rd_gate;
  logic [NW-1:0]           rd_count;

  assign sc_in_valid = (state == B_STORE) && (phase == 2'd0) && (idx < n_sm_q);
  assign busy        = (state != B_IDLE);

  cvms_scaler #(.BV(BV), .BP(BP), .LEVELS(LEVELS), .FRAC(FRAC), .INVW(INVW)) u_scaler (
    .clk, .rst_n,
    .in_valid (sc_in_valid),
    .vc       (vc_q[idx[NW-1:0] < NW'(N) ? idx : '0]),
    .in_pos   (BP'(idx)),
    .vc_min, .inv_dv,
    .out_valid(sc_out_valid),
    .addr     (sc_addr),
    .out_pos  (sc_pos)
  );

  cvms_fifo_array #(.LEVELS(LEVELS), .DEPTH(DEPTH), .BP(BP)) u_mem (
    .clk, .rst_n,
    .clear    (state == B_CLEAR),
    .push     (sc_out_valid),
    .push_addr(sc_addr),
    .push_data(sc_pos),
    .pop      (rd_pop),
    .pop_addr (rd_addr),
    .head_data,
    .empty,
    .overflow
  );

  cvms_reader #(.LEVELS(LEVELS), .N(N), .BP(BP), .IW(IW)) u_reader (
    .clk, .rst_n,
    .start    (state == B_READ_GO),
    .n_ins    ((n_ins_q > n_sm_q) ? n_sm_q : n_ins_q),
    .i_arm    (i_q),
    .empty, .head_data,
    .pop      (rd_pop),
    .pop_addr (rd_addr),
    .gate     (rd_gate),
    .busy     (rd_busy),
    .done     (rd_done),
    .n_selected(rd_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= B_IDLE;
      vc_q    <= '0;
      n_sm_q  <= '0;
      n_ins_q <= '0;
      i_q     <= '0;
      idx     <= '0;
      phase   <= '0;
      gate    <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        B_IDLE: if (start) begin
          vc_q    <= vc;
          n_sm_q  <= (n_sm > NW'(N)) ? NW'(N) : n_sm;
          n_ins_q <= n_ins;
          i_q     <= i_arm;
          state   <= B_CLEAR;
        end
        B_CLEAR: begin
          idx   <= '0;
          phase <= '0;
          state <= B_STORE;
        end
        B_STORE: begin
          if (idx == n_sm_q) state <= B_READ_GO;
          else if (phase == 2'd2) begin
            phase <= '0;
            idx   <= idx + 1'b1;
          end else phase <= phase + 1'b1;
        end
        B_READ_GO: state <= B_READ;
        B_READ: if (rd_done) begin
          gate  <= rd_gate;
          done  <= 1'b1;
          state <= B_IDLE;
        end
        default: state <= B_IDLE;
      endcase
    end
  end

  // The reader must not be started before the last SM has been stored.
  a_store_before_read: assert property (@(posedge clk) disable iff (!rst_n)
    (state == B_READ_GO) |-> !sc_out_valid);
  // Every SM was stored, so the reader must find all it was asked for.
  a_read_complete: assert property (@(posedge clk) disable iff (!rst_n || overflow)
    rd_done |-> (rd_count == ((n_ins_q > n_sm_q) ? n_sm_q : n_ins_q)));
  // The reader stays busy for the whole read phase.
  a_reader_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (state == B_READ && !rd_done) |-> rd_busy);
endmodule
