// Shared types and constants of the asynchronous NoC model.
//
// A flit is 34 bits: a begin-of-packet bit, an end-of-packet bit and a
// 32-bit payload. In a header flit (BOP=1) the low PATH_W payload bits hold
// the path to target, consumed two bits per router and shifted right in each
// node; the upper payload bits are free header payload. The flit format, the
// 32-bit width and the two virtual channels follow the NoC protocol; the
// path width, the 2-bit relative turn code and the port numbering are this
// design's own choices.
//
// Port numbering: N=0, E=1, S=2, W=3, R(local resource)=4. A turn code c in
// 0..3 taken at a router entered through port p selects output port
// (p + 1 + c) mod 5, i.e. one of the four ports other than the input.
package noc_pkg;

  localparam int unsigned DATA_W  = 32;      // payload bits per flit
  localparam int unsigned FLIT_W  = DATA_W + 2;  // + BOP + EOP
  localparam int unsigned NUM_VC  = 2;       // VC0 best effort, VC1 priority
  localparam int unsigned NUM_PORTS = 5;
  localparam int unsigned PATH_W  = 20;      // path-to-target field (10 hops)
  localparam int unsigned VC_DEPTH = 2;      // flits per VC in an input port

  typedef enum logic [2:0] {
    PORT_N = 3'd0,
    PORT_E = 3'd1,
    PORT_S = 3'd2,
    PORT_W = 3'd3,
    PORT_R = 3'd4
  } port_e;

  typedef struct packed {
    logic              bop;
    logic              eop;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Output port selected by turn code 'code' at a router entered through 'in_port'.
  function automatic logic [2:0] turn_to_port(input logic [2:0] in_port,
                                              input logic [1:0] code);
    logic [3:0] s;
    s = 4'(in_port) + 4'd1 + 4'(code);
    if (s >= 4'd5) s = s - 4'd5;
    return s[2:0];
  endfunction

  // Turn code that leads from input port 'in_port' to output port 'out_port'.
  function automatic logic [1:0] port_to_turn(input logic [2:0] in_port,
                                              input logic [2:0] out_port);
    logic [3:0] d;
    d = 4'(out_port) + 4'd5 - 4'(in_port) - 4'd1;
    if (d >= 4'd5) d = d - 4'd5;
    return d[1:0];
  endfunction

  // Path field after one hop: the used turn code is shifted out.
  function automatic flit_t shift_path(input flit_t f);
    flit_t r;
    r = f;
    r.data[PATH_W-1:0] = {2'b00, f.data[PATH_W-1:2]};
    return r;
  endfunction

endpackage
