// discard_policy: decides whether an arriving packet is stored or dropped.
//
// Evaluated once per packet, when its first block is presented. With C
// blocks of main memory, P priority levels and N_p blocks already queued
// at the packet's level p:
//   - a packet that needs more blocks than AM has free is always dropped;
//   - DISCARD_UNCONDITIONAL drops nothing else, whatever the priority;
//   - DISCARD_PROPORTIONAL also drops it when N_p > f_p * C with
//     f_p = (p+1) / (1 + 2 + ... + P), tested as N_p * P(P+1)/2 > (p+1) * C;
//   - DISCARD_UNIFORM also drops it when N_p > C / P, tested as N_p * P > C.
// Purely combinational; accept is valid in the same cycle as its inputs.
//
// The three policies and f_p follow the architecture's description of its
// write function. Testing the occupancy before the packet is added
// (strictly greater than the limit) follows "occupied by other packets";
// the integer form of the tests is this design's.
module discard_policy
  import mqm_pkg::*;
#(
  parameter int unsigned BLK_AW   = 14,  // C = 2^BLK_AW blocks
  parameter int unsigned NUM_PRIO = 3,   // P
  parameter int unsigned PRIO_W   = 2,
  parameter int unsigned NB_W     = 13
) (
  input  discard_mode_e     mode,
  input  logic [PRIO_W-1:0] prio,
  input  logic [NB_W-1:0]   nb,
  input  logic [BLK_AW:0]   cnt [NUM_PRIO],  // N_0 .. N_{P-1}
  input  logic [BLK_AW:0]   free_cnt,
  output logic              fits,
  output logic              accept
);

  localparam longint unsigned CAP   = 64'd1 << BLK_AW;
  localparam longint unsigned NP    = 64'(NUM_PRIO);
  localparam longint unsigned SUM_P = NP * (NP + 1) / 2;

  logic            over;
  longint unsigned occ;

  always_comb begin
    occ  = 64'(cnt[prio]);
    fits = (64'(nb) <= 64'(free_cnt));
    case (mode)
      DISCARD_PROPORTIONAL: over = (occ * SUM_P) > ((64'(prio) + 1) * CAP);
      DISCARD_UNIFORM:      over = (occ * NP) > CAP;
      default:              over = 1'b0;
    endcase
    accept = fits && !over;
  end

endmodule
