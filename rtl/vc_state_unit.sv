// vc_state_unit: the state of one input VC's packet towards one output port.
//
// An input VC holds five of these, one per output port. A unit whose port is
// in the packet's output-port encoding leaves IDLE when the head flit is
// latched and tracks, with a private pointer, how many buffered flits it has
// already sent to its port. Because every unit has its own pointer, a
// multicast packet can advance on one branch while another branch waits.
//
// States:
//   IDLE    nothing to send on this port (not in the route, or packet done)
//   SAVA    waiting for switch and VC allocation; the flit sent on grant is
//           the original head from the buffer, or, after a fragmentation,
//           a virtual head built from the head flit buffer (vhead = 1)
//   ACTIVE  holds an output VC; requests the switch whenever a flit is
//           available to this unit and the output VC has a credit
//   FRAG    the fragment was closed with a virtual tail and the output VC was
//           released; waits for a new flit to arrive, then goes to SAVA with
//           vhead = 1
//
// Dynamic fragmentation (frag): when a multicast packet's unit is granted
// the last flit available to it, that flit is not a head or tail, and no flit
// is entering the input port in the same cycle, the flit is sent as a virtual
// tail and the output VC is released. This rule, the virtual head, and the
// return to SA/VA follow the design description. Not fragmenting on a head
// flit (so that a fragment always has at least a head and a tail) and raising
// a VA request only when the port has a free VC are this design's choices.
//
// ptr counts flits, from the oldest buffered flit, already sent by this unit;
// it drops by one whenever the input VC deletes its oldest flit (del).
module vc_state_unit
  import noc_pkg::*;
#(
  parameter int DEPTH  = VC_DEPTH,
  parameter int NUM_VC = MAX_VC,
  localparam int CW    = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,       // head latched and port in route
  input  logic [CW-1:0]     occ,         // flits in the input VC buffer
  input  flit_type_e        cur_type,    // type of the flit at ptr
  input  logic              multicast,   // latched route has >1 port
  input  logic              arriving,    // a flit enters the input port now
  input  logic              port_free,   // output port has a free VC
  input  logic [NUM_VC-1:0] credit_ok,   // output VCs with a credit
  input  logic              grant,
  input  logic [VCID_W-1:0] grant_vc,    // output VC from VA (in SAVA)
  input  logic              del,         // oldest flit deleted this cycle
  output logic              req,
  output logic              need_va,
  output logic              vhead,       // grant sends a virtual head
  output logic              frag,        // grant sends a virtual tail
  output logic              last,        // grant releases the output VC
  output logic [VCID_W-1:0] out_vc,
  output logic [CW-1:0]     ptr,
  output logic              sends_buf    // grant consumes a buffered flit
);
  typedef enum logic [1:0] {IDLE, SAVA, ACTIVE, FRAG} vcs_e;

  vcs_e state;
  logic vh_pend;
  logic avail;

  assign avail     = (ptr < occ);
  assign need_va   = (state == SAVA);
  assign vhead     = (state == SAVA) && vh_pend;
  assign sends_buf = grant && !vhead;

  always_comb begin
    req = 1'b0;
    case (state)
      SAVA:    req = (vh_pend || avail) && port_free;
      ACTIVE:  req = avail && credit_ok[out_vc];
      default: req = 1'b0;
    endcase
  end

  assign frag = (state == ACTIVE) && multicast && !is_head(cur_type) &&
                !is_tail(cur_type) && (ptr + 1'b1 == occ) && !arriving;
  assign last = (state == ACTIVE) && (is_tail(cur_type) || frag);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      vh_pend <= 1'b0;
      ptr     <= '0;
      out_vc  <= '0;
    end else begin
      ptr <= ptr + CW'(sends_buf) - CW'(del);
      if (start) begin
        state   <= SAVA;
        vh_pend <= 1'b0;
        ptr     <= '0;
      end else begin
        case (state)
          SAVA: if (grant) begin
            out_vc  <= grant_vc;
            vh_pend <= 1'b0;
            state   <= ACTIVE;
          end
          ACTIVE: if (grant) begin
            if (is_tail(cur_type)) state <= IDLE;
            else if (frag)         state <= FRAG;
          end
          FRAG: if (avail) begin
            state   <= SAVA;
            vh_pend <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  // A grant only answers a request.
  assert property (@(posedge clk) disable iff (!rst_n) grant |-> req);

endmodule
