// async_switch: asynchronous central switch, one initiator to NT targets.
//
// The switch is a binary tree of splitter_1to2 nodes, so it is purely
// combinational and scales to any power-of-two number of targets. The node
// at depth d of the tree selects on request-bundle bit ADDR_MSB-d, so the top
// log2(NT) address bits name the target: target i is reached when those bits
// equal i. Nodes are numbered in heap order (node n has children 2n and 2n+1,
// leaves NT..2NT-1 are targets 0..NT-1); child 2n+1 is the node's target 1
// side, taken when its select bit is 1.
//
// Interface: ip_* is the initiator's request channel (rq_in/ack_in/data_in)
// and response channel (rq_out/ack_out/data_out); tp_*[i] are the same
// channels of target i. All channels use the 4-phase bundled-data protocol.
module async_switch #(
  parameter int unsigned NT       = 2,
  parameter int unsigned REQ_W    = 19,
  parameter int unsigned RSP_W    = 10,
  parameter int unsigned ADDR_MSB = 15
) (
  input  logic             ip_rq_in,
  output logic             ip_ack_in,
  input  logic [REQ_W-1:0] ip_data_in,
  output logic             ip_rq_out,
  input  logic             ip_ack_out,
  output logic [RSP_W-1:0] ip_data_out,

  output logic [NT-1:0]            tp_rq_in,
  input  logic [NT-1:0]            tp_ack_in,
  output logic [NT-1:0][REQ_W-1:0] tp_data_in,
  input  logic [NT-1:0]            tp_rq_out,
  output logic [NT-1:0]            tp_ack_out,
  input  logic [NT-1:0][RSP_W-1:0] tp_data_out
);
  timeunit 1ns;
  timeprecision 1ps;

  // Channel signals at every tree node, numbered from 1.
  logic [2*NT-1:1]            n_rq_in, n_ack_in, n_rq_out, n_ack_out;
  logic [2*NT-1:1][REQ_W-1:0] n_data_in;
  logic [2*NT-1:1][RSP_W-1:0] n_data_out;

  assign n_rq_in[1]    = ip_rq_in;
  assign ip_ack_in     = n_ack_in[1];
  assign n_data_in[1]  = ip_data_in;
  assign ip_rq_out     = n_rq_out[1];
  assign n_ack_out[1]  = ip_ack_out;
  assign ip_data_out   = n_data_out[1];

  for (genvar n = 1; n < NT; n++) begin : g_node
    localparam int unsigned DEPTH = $clog2(n + 1) - 1;
    splitter_1to2 #(
      .REQ_W  (REQ_W),
      .RSP_W  (RSP_W),
      .SEL_BIT(ADDR_MSB - DEPTH)
    ) u_split (
      .ip_rq_in    (n_rq_in[n]),
      .ip_ack_in   (n_ack_in[n]),
      .ip_data_in  (n_data_in[n]),
      .ip_rq_out   (n_rq_out[n]),
      .ip_ack_out  (n_ack_out[n]),
      .ip_data_out (n_data_out[n]),
      .tp1_rq_in   (n_rq_in[2*n+1]),
      .tp1_ack_in  (n_ack_in[2*n+1]),
      .tp1_data_in (n_data_in[2*n+1]),
      .tp1_rq_out  (n_rq_out[2*n+1]),
      .tp1_ack_out (n_ack_out[2*n+1]),
      .tp1_data_out(n_data_out[2*n+1]),
      .tp2_rq_in   (n_rq_in[2*n]),
      .tp2_ack_in  (n_ack_in[2*n]),
      .tp2_data_in (n_data_in[2*n]),
      .tp2_rq_out  (n_rq_out[2*n]),
      .tp2_ack_out (n_ack_out[2*n]),
      .tp2_data_out(n_data_out[2*n])
    );
  end

  for (genvar i = 0; i < NT; i++) begin : g_leaf
    assign tp_rq_in[i]       = n_rq_in[NT+i];
    assign n_ack_in[NT+i]    = tp_ack_in[i];
    assign tp_data_in[i]     = n_data_in[NT+i];
    assign n_rq_out[NT+i]    = tp_rq_out[i];
    assign tp_ack_out[i]     = n_ack_out[NT+i];
    assign n_data_out[NT+i]  = tp_data_out[i];
  end

  initial begin
    assert (NT >= 2 && (NT & (NT - 1)) == 0)
      else $error("async_switch: NT must be a power of two of at least 2");
  end
endmodule
