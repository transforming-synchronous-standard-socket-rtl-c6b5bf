// gals_pkg: types and helpers shared by the GALS OCP interconnect.
//
// The interconnect carries the OCP basic-interface signals over 4-phase
// bundled-data channels. A request bundle is {MCmd, MAddr, MData} and a
// response bundle is {SResp, SData}. The encodings of MCmd and SResp are the
// OCP basic ones (IDLE/WR/RD and NULL/DVA/FAIL/ERR); the bundle layouts are
// this design's choice.
package gals_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [2:0] {
    CMD_IDLE = 3'd0,
    CMD_WR   = 3'd1,
    CMD_RD   = 3'd2
  } ocp_cmd_e;

  typedef enum logic [1:0] {
    RESP_NULL = 2'd0,
    RESP_DVA  = 2'd1,
    RESP_FAIL = 2'd2,
    RESP_ERR  = 2'd3
  } ocp_resp_e;

  localparam int unsigned CMD_W  = 3;
  localparam int unsigned RESP_W = 2;

  // Width of a request bundle {MCmd, MAddr, MData}.
  function automatic int unsigned req_w(int unsigned aw, int unsigned dw);
    return CMD_W + aw + dw;
  endfunction

  // Width of a response bundle {SResp, SData}.
  function automatic int unsigned rsp_w(int unsigned dw);
    return RESP_W + dw;
  endfunction
endpackage
