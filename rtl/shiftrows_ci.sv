// shiftrows_ci: one of the four ShiftRows blocks C0..C3 of the 32-bit cipher
// data path; instance ROW handles state row ROW (one byte lane).
//
// The state enters as a stream of columns, one byte of this row per step
// (arrival k of a round carries column k). ShiftRows requires that output
// column c of this row be the byte of input column (c+ROW) mod 4 of the same
// round. Since output column 0 needs input column 3 of some row, the output
// of a round starts at the step in which input column 3 arrives and
// continues over the next three steps, while the next round's columns
// already flow in. In that steady state every Ci holds exactly three bytes
// (12 bytes for the whole ShiftRows), the minimum the architecture allows.
//
// Storage is three dual-rail byte registers, each tagged by a small state
// machine with the column index and round parity of the byte it holds. A
// departure reads the register whose tag matches (or takes the arriving byte
// straight through when it is the one needed, as row 3 does for column 0),
// and an arriving byte is written into a register that is free or being read
// in the same step.
//
// Interface (all decisions are taken by the cipher controller, which joins
// the per-row flags of the four blocks):
//   in_valid/in_byte  a byte is offered in this step
//   ready_nodep       it could be stored if no departure takes place
//   ready_dep         it could be stored if the departure takes place
//   arrive            the byte is taken at this clock edge
//   out_valid/out_byte the byte of the next output column is available
//   depart            the output byte is consumed at this clock edge
//   clear             forget everything (start of a new block)
//
// Four Ci blocks of three bytes each with a state machine follow the reference
// architecture; the tagging scheme and the two-round overlap are this
// design's way of meeting that storage bound.
module shiftrows_ci
  import aes_async_pkg::*;
#(
  parameter int unsigned ROW = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clear,
  input  logic     in_valid,
  input  dr_byte_t in_byte,
  output logic     ready_nodep,
  output logic     ready_dep,
  input  logic     arrive,
  output logic     out_valid,
  output dr_byte_t out_byte,
  input  logic     depart
);

  localparam int unsigned NREG = 3;

  typedef struct packed {
    logic       par;   // round parity
    logic [1:0] col;   // column index
  } tag_t;

  dr_byte_t        data [NREG];
  tag_t            tag  [NREG];
  logic [NREG-1:0] vld;
  tag_t            a_tag;   // tag of the next arrival
  tag_t            d_tag;   // column/round of the next departure
  tag_t            need;    // tag of the byte that departure needs

  logic [NREG-1:0] hit, free;
  logic            byp;
  logic [1:0]      hit_idx, wr_idx;

  always_comb begin
    need.par = d_tag.par;
    need.col = d_tag.col + 2'(ROW);   // wraps mod 4
    byp      = in_valid && (a_tag == need);
    hit_idx  = 0;
    for (int j = 0; j < NREG; j++) begin
      hit[j] = vld[j] && (tag[j] == need);
      if (hit[j]) hit_idx = 2'(j);
    end
    out_valid = byp || (|hit);
    out_byte  = byp ? in_byte : (|hit ? data[hit_idx] : '0);
    wr_idx = 0;
    for (int j = NREG - 1; j >= 0; j--) begin
      free[j] = !vld[j] || (depart && hit[j]);
      if (free[j]) begin
        wr_idx = 2'(j);
      end
    end
    ready_nodep = !(&vld);
    ready_dep   = !(&vld) || (|hit) || byp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld   <= '0;
      a_tag <= '0;
      d_tag <= '0;
      for (int j = 0; j < NREG; j++) begin
        data[j] <= '0;
        tag[j]  <= '0;
      end
    end else if (clear) begin
      vld   <= '0;
      a_tag <= '0;
      d_tag <= '0;
    end else begin
      if (depart) begin
        if (!byp) vld[hit_idx] <= 1'b0;
        d_tag <= d_tag + 3'd1;
      end
      if (arrive) begin
        if (!(depart && byp)) begin
          data[wr_idx] <= in_byte;
          tag[wr_idx]  <= a_tag;
          vld[wr_idx]  <= 1'b1;
        end
        a_tag <= a_tag + 3'd1;
      end
    end
  end

  // A departure must find its byte, an arrival must find room.
  always_ff @(posedge clk) begin
    if (!clear) begin
      assert (!depart || out_valid) else $error("shiftrows_ci: depart without data");
      assert (!arrive || (depart ? ready_dep : ready_nodep)) else $error("shiftrows_ci: arrive without room");
    end
  end

endmodule
