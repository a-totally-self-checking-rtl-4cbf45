// Records, per probed cell instance, which input combinations it has seen
// and which ones it must see. The probes adder_cov (bound into every
// full_adder and half_adder) and trc_cov (bound into two_rail_cell) call
// note() whenever their cell's inputs change while enable is set. A
// combination is a number of up to four input bits; seen and need hold one
// bit per combination.
package tb_cov_pkg;
  bit          enable = 1'b0;
  logic [15:0] seen [string];
  logic [15:0] need [string];

  function automatic void note(input string path, input logic [15:0] nd, input logic [3:0] v);
    if (!enable) return;
    if (!seen.exists(path)) begin
      seen[path] = '0;
      need[path] = nd;
    end
    seen[path][v] = 1'b1;
  endfunction

  // 1 when path lies inside the hierarchy scope
  function automatic bit under(input string path, input string scope);
    return path.len() > scope.len() && path.substr(0, scope.len() - 1) == scope &&
           path[scope.len()] == ".";
  endfunction
endpackage
